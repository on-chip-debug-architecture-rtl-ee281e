// jtag_block: the extended IEEE 1149.1 JTAG block of the MOCD architecture.
// Standard part: TAP controller, 4-bit instruction register, 32-bit ID
// register, bypass register. Extended part:
//  - scan chain selection register (instruction SEL_SCAN_CHAIN): its value
//    picks which scan chain the SCAN_ACCESS instruction routes between TDI
//    and TDO. The chains are separate (never concatenated). Numbering used
//    here: chain c < N_CORES is core c's memory-bus chain, chain N_CORES+c
//    is core c's breakpoint-register chain, chain 2*N_CORES is the cross
//    breakpoint manager's configuration chain (N_CHAINS = 2*N_CORES+1).
//  - JTAG selection register (instruction SEL_JTAG), decoder and the
//    TDI/TMS/TCK/nTRST multiplexers and TDO demultiplexer: while the SEL pin
//    is low the external pins drive this TAP; while SEL is high the pins are
//    connected straight to internal JTAG port jtag_sel, the MOCD TAP sees no
//    TCK, TMS/TDI idle high and nTRST inactive, and unselected internal
//    ports get TCK low, TMS/TDI high and nTRST high.
// Registers capture/shift on rising TCK and update on falling TCK; TDO is
// driven from a falling-edge register (tdo_oe marks when it is valid).
// Instruction codes, register widths, the ID value and the idle levels of
// unselected ports are this design's choice; the document gives the
// registers, the two private instructions and the SEL behaviour. Only
// BYPASS and IDCODE of the public instructions are present: there is no
// pin boundary register in this design. Other codes select bypass.
module jtag_block
  import mocd_pkg::*;
#(
  parameter int unsigned  N_CHAINS = 9,
  parameter int unsigned  SSEL_W   = 4,
  parameter int unsigned  N_IP     = 4,
  parameter int unsigned  JSEL_W   = 2,
  parameter logic [31:0]  IDCODE   = 32'h1000_0A5B
) (
  // external JTAG pins
  input  logic                tck,
  input  logic                tms,
  input  logic                tdi,
  input  logic                trst_n,
  input  logic                sel,
  output logic                tdo,
  output logic                tdo_oe,
  // internal JTAG ports of JTAG-based IPs
  output logic [N_IP-1:0]     ip_tck,
  output logic [N_IP-1:0]     ip_tms,
  output logic [N_IP-1:0]     ip_tdi,
  output logic [N_IP-1:0]     ip_trst_n,
  input  logic [N_IP-1:0]     ip_tdo,
  // to the MOCD scan chains
  output logic                tck_o,
  output logic                trst_n_o,
  output logic                tdi_o,
  output dr_ctrl_t            dr_o,
  output logic [N_CHAINS-1:0] chain_sel,
  input  logic [N_CHAINS-1:0] chain_tdo,
  output logic                rti,
  output logic [SSEL_W-1:0]   scan_sel,
  output logic [JSEL_W-1:0]   jtag_sel,
  output logic [IR_W-1:0]     instr
);

  // ---- input multiplexers (SEL) -------------------------------------------
  logic m_tms;
  assign tck_o    = sel ? 1'b0 : tck;
  assign m_tms    = sel ? 1'b1 : tms;
  assign tdi_o    = sel ? 1'b1 : tdi;
  assign trst_n_o = sel ? 1'b1 : trst_n;

  // ---- TAP controller -----------------------------------------------------
  tap_state_e state;
  dr_ctrl_t   dr, ir;
  logic       tlr;

  tap_controller u_tap (
    .tck(tck_o), .trst_n(trst_n_o), .tms(m_tms),
    .state, .dr, .ir, .rti, .tlr
  );
  assign dr_o = dr;

  // ---- instruction register -------------------------------------------------
  logic [IR_W-1:0] ir_sh;

  always_ff @(posedge tck_o or negedge trst_n_o) begin
    if (!trst_n_o)       ir_sh <= '0;
    else if (ir.capture) ir_sh <= IR_W'(1);  // "01" in the two LSBs
    else if (ir.shift)   ir_sh <= {tdi_o, ir_sh[IR_W-1:1]};
  end

  always_ff @(negedge tck_o or negedge trst_n_o) begin
    if (!trst_n_o)      instr <= INSTR_IDCODE;
    else if (tlr)       instr <= INSTR_IDCODE;
    else if (ir.update) instr <= ir_sh;
  end

  // ---- data registers -------------------------------------------------------
  logic              bypass_sh;
  logic [31:0]       id_sh;
  logic [SSEL_W-1:0] ssel_sh;
  logic [JSEL_W-1:0] jsel_sh;
  logic              is_id, is_ssel, is_jsel, is_scan;

  assign is_id   = (instr == INSTR_IDCODE);
  assign is_ssel = (instr == INSTR_SEL_SCAN_CHAIN);
  assign is_jsel = (instr == INSTR_SEL_JTAG);
  assign is_scan = (instr == INSTR_SCAN_ACCESS);

  always_ff @(posedge tck_o or negedge trst_n_o) begin
    if (!trst_n_o) begin
      bypass_sh <= 1'b0;
      id_sh     <= '0;
      ssel_sh   <= '0;
      jsel_sh   <= '0;
    end else if (dr.capture) begin
      bypass_sh <= 1'b0;
      id_sh     <= IDCODE;
      ssel_sh   <= scan_sel;
      jsel_sh   <= jtag_sel;
    end else if (dr.shift) begin
      bypass_sh <= tdi_o;
      if (is_id)   id_sh   <= {tdi_o, id_sh[31:1]};
      if (is_ssel) ssel_sh <= SSEL_W'({tdi_o, ssel_sh} >> 1);
      if (is_jsel) jsel_sh <= JSEL_W'({tdi_o, jsel_sh} >> 1);
    end
  end

  always_ff @(negedge tck_o or negedge trst_n_o) begin
    if (!trst_n_o) begin
      scan_sel <= '0;
      jtag_sel <= '0;
    end else if (dr.update) begin
      if (is_ssel) scan_sel <= ssel_sh;
      if (is_jsel) jtag_sel <= jsel_sh;
    end
  end

  for (genvar c = 0; c < N_CHAINS; c++) begin : g_sel
    assign chain_sel[c] = is_scan && (scan_sel == SSEL_W'(c));
  end

  // ---- TDO multiplexers -----------------------------------------------------
  logic tdo_mux, chain_out, tdo_q, shifting;

  assign chain_out = (32'(scan_sel) < N_CHAINS) ? chain_tdo[scan_sel] : bypass_sh;

  always_comb begin
    if (ir.shift)     tdo_mux = ir_sh[0];
    else if (is_id)   tdo_mux = id_sh[0];
    else if (is_ssel) tdo_mux = ssel_sh[0];
    else if (is_jsel) tdo_mux = jsel_sh[0];
    else if (is_scan) tdo_mux = chain_out;
    else              tdo_mux = bypass_sh;
  end

  assign shifting = ir.shift || dr.shift;

  always_ff @(negedge tck_o or negedge trst_n_o) begin
    if (!trst_n_o) begin
      tdo_q  <= 1'b0;
      tdo_oe <= 1'b0;
    end else begin
      tdo_q  <= tdo_mux;
      tdo_oe <= shifting;
    end
  end

  // ---- internal JTAG ports: decoder, multiplexers, TDO demultiplexer ------
  for (genvar k = 0; k < N_IP; k++) begin : g_ip
    logic hit;
    assign hit          = sel && (jtag_sel == JSEL_W'(k));
    assign ip_tck[k]    = hit ? tck    : 1'b0;
    assign ip_tms[k]    = hit ? tms    : 1'b1;
    assign ip_tdi[k]    = hit ? tdi    : 1'b1;
    assign ip_trst_n[k] = hit ? trst_n : 1'b1;
  end

  assign tdo = sel ? ip_tdo[jtag_sel] : tdo_q;

endmodule
