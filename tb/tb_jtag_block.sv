// tb_jtag_block: drives the extended JTAG block through its pins only.
// Checks: IDCODE after reset, bypass (one-cycle delay), the scan chain
// selection register (write, read back, one-hot chain select), routing of a
// selected chain between TDI and TDO (chains modelled here as plain shift
// registers of different lengths), and the JTAG selection register with the
// SEL pin connecting the external pins to one internal JTAG port.
module tb_jtag_block;
  import mocd_pkg::*;

  localparam int NCH = 9;
  localparam int NIP = 4;
  localparam time TCK_HALF = 10;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, sel = 0, tdo, tdo_oe;
  logic [NIP-1:0] ip_tck, ip_tms, ip_tdi, ip_trst_n, ip_tdo;
  logic tck_o, trst_n_o, tdi_o, rti;
  dr_ctrl_t dr_o;
  logic [NCH-1:0] chain_sel, chain_tdo;
  logic [3:0] scan_sel, instr;
  logic [1:0] jtag_sel;
  int checks = 0, failures = 0;
  int ip_edges[NIP];

  jtag_block #(.N_CHAINS(NCH), .SSEL_W(4), .N_IP(NIP), .JSEL_W(2)) dut (.*);

  `include "jtag_host.svh"

  // chain models: chain c is a (c+3)-bit shift register
  logic [15:0] chains[NCH];
  for (genvar c = 0; c < NCH; c++) begin : g_ch
    always_ff @(posedge tck_o)
      if (chain_sel[c] && dr_o.shift) begin
        chains[c]        <= chains[c] >> 1;
        chains[c][c + 2] <= tdi_o;
      end
    assign chain_tdo[c] = chains[c][0];
  end
  for (genvar k = 0; k < NIP; k++) begin : g_ip
    always @(posedge ip_tck[k]) ip_edges[k]++;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] o;
    ip_tdo = '0;
    foreach (chains[c]) chains[c] = '0;
    #1 trst_n = 0;
    #1 trst_n = 1;
    tap_reset();
    check("instr after reset", instr, INSTR_IDCODE);
    shift_dr('0, 32, o);
    check("IDCODE", o[31:0], 32'h1000_0A5B);
    shift_ir(INSTR_BYPASS);
    shift_dr(128'hA5, 9, o);
    check("bypass", o[8:0], 9'h14A);
    // scan chain selection register
    shift_ir(INSTR_SEL_SCAN_CHAIN);
    shift_dr(128'd5, 4, o);
    check("scan_sel", scan_sel, 5);
    shift_dr(128'd5, 4, o);
    check("scan_sel readback", o[3:0], 5);
    check("no chain selected outside SCAN_ACCESS", chain_sel, 0);
    shift_ir(INSTR_SCAN_ACCESS);
    check("chain_sel one-hot", chain_sel, 9'b000100000);
    // chain 5 is 8 bits long: first scan fills, second returns the first pattern
    shift_dr(128'h3C, 8, o);
    shift_dr(128'hC3, 8, o);
    check("chain 5 data", o[7:0], 8'h3C);
    // another chain, length 3
    shift_ir(INSTR_SEL_SCAN_CHAIN);
    shift_dr(128'd0, 4, o);
    shift_ir(INSTR_SCAN_ACCESS);
    check("chain_sel 0", chain_sel, 9'b000000001);
    shift_dr(128'h5, 3, o);
    shift_dr(128'h2, 3, o);
    check("chain 0 data", o[2:0], 3'h5);
    // JTAG selection register and SEL pass-through
    shift_ir(INSTR_SEL_JTAG);
    shift_dr(128'd2, 2, o);
    check("jtag_sel", jtag_sel, 2);
    foreach (ip_edges[k]) ip_edges[k] = 0;
    sel = 1;
    ip_tdo = 4'b0100;
    #1 check("TDO from IP 2", tdo, 1);
    ip_tdo = 4'b1011;
    #1 check("TDO from IP 2 low", tdo, 0);
    tms = 0; tdi = 0;
    #1 check("ip2 TMS follows", ip_tms, 4'b1011);
    for (int i = 0; i < 5; i++) begin
      #(TCK_HALF) tck = 1;
      #(TCK_HALF) tck = 0;
    end
    check("ip2 clocked", ip_edges[2], 5);
    check("ip0 idle", ip_edges[0] + ip_edges[1] + ip_edges[3], 0);
    check("MOCD TAP frozen", instr, INSTR_SEL_JTAG);
    sel = 0;
    #1 check("IP ports idle after SEL low", ip_tms, 4'b1111);
    shift_dr(128'd1, 2, o);
    check("MOCD TAP usable again", o[1:0], 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
