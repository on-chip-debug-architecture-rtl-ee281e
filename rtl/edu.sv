// edu: embedded debug unit, one per processor core. It joins the three EDU
// modules of the document: the comparator (breakpoint detection on the
// core's memory access signals), the switch mode controller (run/stop mode
// switching, stop_mode_en, debug control) and the scan chain on the memory
// access bus (instruction/data insertion and result capture in stop mode).
// JTAG side: TCK, nTRST, TDI and the data-register strobes are shared with
// the other chains; sel_bus / sel_regs route this EDU's bus chain or
// breakpoint-register chain to the TAP, and tdo_bus / tdo_regs return them.
// Core side: the SMC runs on the core's external clock (clk); int_bkpt_en
// is combinational from the memory access signals of the same cycle.
module edu
  import mocd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // JTAG
  input  logic              tck,
  input  logic              trst_n,
  input  logic              tdi,
  input  dr_ctrl_t          dr,
  input  logic              sel_bus,
  input  logic              sel_regs,
  output logic              tdo_bus,
  output logic              tdo_regs,
  // MDSU
  input  logic              ext_bkpt_en,
  output logic              stop_mode_en,
  // core
  input  mem_bus_t          bus,
  input  status_info_t      status,
  output debug_ctrl_t       debug_ctrl,
  input  logic [INSN_W-1:0] cap_ir,
  input  logic [DATA_W-1:0] cap_lsu,
  output logic [INSN_W-1:0] ir_insert,
  output logic [DATA_W-1:0] lsu_insert,
  // observation
  output bkpt_cause_e       cause,
  output smc_state_e        smc_state
);

  logic int_bkpt_en, addr_hit, data_hit, debug_end_tgl, halt_req_tgl;

  edu_comparator u_cmp (
    .tck, .trst_n, .tdi, .dr, .sel(sel_regs), .tdo(tdo_regs),
    .bus, .stop_mode_en, .cause, .smc_state,
    .int_bkpt_en, .addr_hit, .data_hit, .debug_end_tgl, .halt_req_tgl
  );

  edu_smc u_smc (
    .clk, .rst_n, .int_bkpt_en, .addr_hit, .fetch_addr(bus.fetch_addr),
    .ext_bkpt_en, .status, .debug_end_tgl, .halt_req_tgl,
    .stop_mode_en, .debug_ctrl, .cause, .state(smc_state)
  );

  edu_scan_chain u_scan (
    .tck, .trst_n, .tdi, .dr, .sel(sel_bus), .tdo(tdo_bus),
    .cap_ir, .cap_lsu, .ir_insert, .lsu_insert
  );

endmodule
