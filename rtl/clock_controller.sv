// clock_controller: MDSU clock controller. For each core i a 2x1 multiplexer
// selects the core clock: in run mode (stop_mode_en[i] = 0) ext_clk[i]
// passes straight to core_clk[i]; in stop mode the core gets TCK AND
// debug_clk_en[i], so it receives one controlled clock pulse per TCK cycle
// while debug_clk_en[i] is set and is otherwise stopped.
// debug_clk_en[i] is set while the TAP is in Run-Test/Idle and the scan
// chain selection register holds core i's bus chain number (chain i). It is
// registered on the falling edge of TCK so that the AND with TCK yields
// whole pulses only (this register is this design's choice; the mux, the
// AND and the enable conditions are the document's).
// The mux is a plain combinational clock mux, as in the document; stop_mode_en
// changes on a rising edge of ext_clk, so leaving and entering stop mode
// cuts at most the current ext_clk high phase.
module clock_controller
  import mocd_pkg::*;
#(
  parameter int unsigned N_CORES = 4,
  parameter int unsigned SSEL_W  = 4
) (
  input  logic [N_CORES-1:0] ext_clk,
  input  logic               tck,
  input  logic               trst_n,
  input  logic               tap_rti,
  input  logic [SSEL_W-1:0]  scan_sel,
  input  logic [N_CORES-1:0] stop_mode_en,
  output logic [N_CORES-1:0] debug_clk_en,
  output logic [N_CORES-1:0] core_clk
);

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    always_ff @(negedge tck or negedge trst_n) begin
      if (!trst_n) debug_clk_en[i] <= 1'b0;
      else         debug_clk_en[i] <= tap_rti && (scan_sel == SSEL_W'(i));
    end
    assign core_clk[i] = stop_mode_en[i] ? (tck & debug_clk_en[i]) : ext_clk[i];
  end

endmodule
