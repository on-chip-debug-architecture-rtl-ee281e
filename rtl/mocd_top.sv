// mocd_top: multicore on-chip debug (MOCD) infrastructure for an N_CORES
// processor. One EDU per core detects breakpoints and switches its core
// between run and stop mode; the MDSU supplies every core clock (external
// clock in run mode, TCK pulses in stop mode) and cross-triggers stops
// between cores; the extended JTAG block gives one external JTAG connection
// to all scan chains and, through the SEL pin, to further JTAG-based IPs.
// The processor cores are outside this module: each core's debug interface
// (clock, memory access signals, status info, debug control, IR/LSU insert
// and capture paths) is brought out as arrays indexed by core.
// ip_dbg_req lets other hardware (an IP's debug or interrupt request line)
// stop a core: it is ORed with the CBM's ext_bkpt_en of that core.
// Scan chains: c < N_CORES bus chain of core c; N_CORES+c breakpoint
// registers of core c; 2*N_CORES cross breakpoint manager.
module mocd_top
  import mocd_pkg::*;
#(
  parameter int unsigned N_CORES = 4,
  parameter int unsigned N_IP    = 4
) (
  input  logic [N_CORES-1:0]              ext_clk,
  input  logic                            rst_n,
  // external JTAG port
  input  logic                            tck,
  input  logic                            tms,
  input  logic                            tdi,
  input  logic                            trst_n,
  input  logic                            sel,
  output logic                            tdo,
  output logic                            tdo_oe,
  // internal JTAG ports of JTAG-based IPs
  output logic [N_IP-1:0]                 ip_tck,
  output logic [N_IP-1:0]                 ip_tms,
  output logic [N_IP-1:0]                 ip_tdi,
  output logic [N_IP-1:0]                 ip_trst_n,
  input  logic [N_IP-1:0]                 ip_tdo,
  // per-core debug interface
  output logic [N_CORES-1:0]              core_clk,
  output logic [N_CORES-1:0]              stop_mode_en,
  output debug_ctrl_t [N_CORES-1:0]       debug_ctrl,
  input  status_info_t [N_CORES-1:0]      status,
  input  mem_bus_t [N_CORES-1:0]          bus,
  input  logic [N_CORES-1:0][INSN_W-1:0]  cap_ir,
  input  logic [N_CORES-1:0][DATA_W-1:0]  cap_lsu,
  output logic [N_CORES-1:0][INSN_W-1:0]  ir_insert,
  output logic [N_CORES-1:0][DATA_W-1:0]  lsu_insert,
  // stop requests from other hardware, one per core
  input  logic [N_CORES-1:0]              ip_dbg_req,
  // observation
  output logic [N_CORES-1:0]              ext_bkpt_en,
  output logic [N_CORES-1:0]              debug_clk_en,
  output bkpt_cause_e [N_CORES-1:0]       cause,
  output smc_state_e [N_CORES-1:0]        smc_state
);

  localparam int unsigned N_CHAINS = 2 * N_CORES + 1;
  localparam int unsigned SSEL_W   = $clog2(N_CHAINS);
  localparam int unsigned JSEL_W   = (N_IP > 1) ? $clog2(N_IP) : 1;

  logic                  j_tck, j_trst_n, j_tdi, rti;
  dr_ctrl_t              dr;
  logic [N_CHAINS-1:0]   chain_sel, chain_tdo;
  logic [SSEL_W-1:0]     scan_sel;
  logic [JSEL_W-1:0]     jtag_sel;
  logic [IR_W-1:0]       instr;
  logic [N_CORES-1:0]    stop_req;

  assign stop_req = ext_bkpt_en | ip_dbg_req;

  jtag_block #(
    .N_CHAINS(N_CHAINS), .SSEL_W(SSEL_W), .N_IP(N_IP), .JSEL_W(JSEL_W)
  ) u_jtag (
    .tck, .tms, .tdi, .trst_n, .sel, .tdo, .tdo_oe,
    .ip_tck, .ip_tms, .ip_tdi, .ip_trst_n, .ip_tdo,
    .tck_o(j_tck), .trst_n_o(j_trst_n), .tdi_o(j_tdi), .dr_o(dr),
    .chain_sel, .chain_tdo, .rti, .scan_sel, .jtag_sel, .instr
  );

  mdsu #(.N_CORES(N_CORES), .SSEL_W(SSEL_W)) u_mdsu (
    .ext_clk, .tck(j_tck), .trst_n(j_trst_n), .tdi(j_tdi), .dr,
    .tap_rti(rti), .scan_sel,
    .sel_cbm(chain_sel[2*N_CORES]), .tdo_cbm(chain_tdo[2*N_CORES]),
    .stop_mode_en, .ext_bkpt_en, .debug_clk_en, .core_clk
  );

  for (genvar i = 0; i < N_CORES; i++) begin : g_edu
    edu u_edu (
      .clk(ext_clk[i]), .rst_n,
      .tck(j_tck), .trst_n(j_trst_n), .tdi(j_tdi), .dr,
      .sel_bus(chain_sel[i]), .sel_regs(chain_sel[N_CORES+i]),
      .tdo_bus(chain_tdo[i]), .tdo_regs(chain_tdo[N_CORES+i]),
      .ext_bkpt_en(stop_req[i]), .stop_mode_en(stop_mode_en[i]),
      .bus(bus[i]), .status(status[i]), .debug_ctrl(debug_ctrl[i]),
      .cap_ir(cap_ir[i]), .cap_lsu(cap_lsu[i]),
      .ir_insert(ir_insert[i]), .lsu_insert(lsu_insert[i]),
      .cause(cause[i]), .smc_state(smc_state[i])
    );
  end

endmodule
