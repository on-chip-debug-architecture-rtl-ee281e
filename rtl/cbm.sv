// cbm: cross breakpoint manager. It forces cores into stop mode when other
// cores stop, so that cores running related tasks halt together.
// For each core i, ext_bkpt_en[i] is high when, for every other core j whose
// bit is clear in the stop mode mask register mask_reg[i], stop_mode_en[j]
// equals bit j of the stop mode value register stop_mode_reg[i]; a set mask
// bit removes core j from the condition (XNOR, OR with mask, AND over j, as
// drawn in the document). Bit i of core i's registers is ignored.
// This design adds one rule: a core whose mask bits are all set never gets
// ext_bkpt_en, so that a fully masked core is not forced to stop forever.
// Registers: a 2*N*N-bit JTAG data register {mask_reg[N-1..0],
// stop_mode_reg[N-1..0]}, core i's N bits at offset i*N within each half,
// shifted LSB first; Capture-DR reads the registers back, Update-DR
// (falling TCK) writes them. After reset every mask bit is set (no cross
// triggering). ext_bkpt_en is combinational from the stop_mode_en inputs.
module cbm
  import mocd_pkg::*;
#(
  parameter int unsigned N_CORES = 4
) (
  input  logic               tck,
  input  logic               trst_n,
  input  logic               tdi,
  input  dr_ctrl_t           dr,
  input  logic               sel,
  output logic               tdo,
  input  logic [N_CORES-1:0] stop_mode_en,
  output logic [N_CORES-1:0] ext_bkpt_en
);

  localparam int unsigned NN = N_CORES * N_CORES;

  logic [NN-1:0]   value_reg, mask_reg;
  logic [2*NN-1:0] chain;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                chain <= '0;
    else if (sel && dr.capture) chain <= {mask_reg, value_reg};
    else if (sel && dr.shift)   chain <= {tdi, chain[2*NN-1:1]};
  end

  assign tdo = chain[0];

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      value_reg <= '0;
      mask_reg  <= '1;
    end else if (sel && dr.update) begin
      {mask_reg, value_reg} <= chain;
    end
  end

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    logic [N_CORES-1:0] term;
    logic [N_CORES-1:0] mask_i;
    for (genvar j = 0; j < N_CORES; j++) begin : g_term
      assign mask_i[j] = (i == j) ? 1'b1 : mask_reg[i*N_CORES+j];
      assign term[j]   = ~(stop_mode_en[j] ^ value_reg[i*N_CORES+j]) | mask_i[j];
    end
    assign ext_bkpt_en[i] = (&term) && !(&mask_i);
  end

endmodule
