// mdsu: multicore debug support unit. It holds the clock controller, which
// supplies every core clock (ext_clk in run mode, controlled TCK pulses in
// stop mode), and the cross breakpoint manager, which turns the cores'
// stop_mode_en signals into ext_bkpt_en requests for the other cores. Both
// take the stop_mode_en signals of all EDUs and the TAP signals; the CBM's
// configuration register is one JTAG scan chain (sel_cbm / tdo_cbm).
module mdsu
  import mocd_pkg::*;
#(
  parameter int unsigned N_CORES = 4,
  parameter int unsigned SSEL_W  = 4
) (
  input  logic [N_CORES-1:0] ext_clk,
  input  logic               tck,
  input  logic               trst_n,
  input  logic               tdi,
  input  dr_ctrl_t           dr,
  input  logic               tap_rti,
  input  logic [SSEL_W-1:0]  scan_sel,
  input  logic               sel_cbm,
  output logic               tdo_cbm,
  input  logic [N_CORES-1:0] stop_mode_en,
  output logic [N_CORES-1:0] ext_bkpt_en,
  output logic [N_CORES-1:0] debug_clk_en,
  output logic [N_CORES-1:0] core_clk
);

  clock_controller #(.N_CORES(N_CORES), .SSEL_W(SSEL_W)) u_clkctl (
    .ext_clk, .tck, .trst_n, .tap_rti, .scan_sel, .stop_mode_en,
    .debug_clk_en, .core_clk
  );

  cbm #(.N_CORES(N_CORES)) u_cbm (
    .tck, .trst_n, .tdi, .dr, .sel(sel_cbm), .tdo(tdo_cbm),
    .stop_mode_en, .ext_bkpt_en
  );

endmodule
