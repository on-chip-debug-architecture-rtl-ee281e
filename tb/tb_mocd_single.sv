// tb_mocd_single: the MOCD infrastructure in its smallest configuration, one
// core and one internal JTAG port (three scan chains, 2-bit scan chain
// selection register). Through the JTAG pins only, it reads IDCODE, stops
// the core at an address breakpoint, checks the precise stop point and that
// the CBM never cross-triggers a lone core, reads a register through the
// bus chain with controlled clock pulses, and resumes the core.
module tb_mocd_single;
  import mocd_pkg::*;

  localparam int N = 1;
  localparam time TCK_HALF = 20;

  logic [N-1:0] ext_clk = '0;
  logic rst_n = 0;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, sel = 0, tdo, tdo_oe;
  logic [0:0] ip_tck, ip_tms, ip_tdi, ip_trst_n, ip_tdo = '0;
  logic [N-1:0] core_clk, stop_mode_en, ext_bkpt_en, debug_clk_en;
  logic [N-1:0] ip_dbg_req = '0;
  debug_ctrl_t [N-1:0] debug_ctrl;
  status_info_t [N-1:0] status;
  mem_bus_t [N-1:0] bus;
  logic [N-1:0][INSN_W-1:0] cap_ir, ir_insert;
  logic [N-1:0][DATA_W-1:0] cap_lsu, lsu_insert;
  bkpt_cause_e [N-1:0] cause;
  smc_state_e [N-1:0] smc_state;

  int checks = 0, failures = 0;

  mocd_top #(.N_CORES(1), .N_IP(1)) dut (.*);

  `include "jtag_host.svh"

  function automatic logic [31:0] enc(input logic [3:0] o, input logic [3:0] r, input logic [15:0] i);
    return {o, r, 8'h0, i};
  endfunction

  mini_core u_core (.clk(core_clk[0]), .rst_n, .stop_mode_en(stop_mode_en[0]),
                    .debug_ctrl(debug_ctrl[0]), .ir_insert(ir_insert[0]),
                    .lsu_insert(lsu_insert[0]), .bus(bus[0]), .status(status[0]),
                    .cap_ir(cap_ir[0]), .cap_lsu(cap_lsu[0]));
  always #5 ext_clk[0] = ~ext_clk[0];

  // the selection register is 2 bits wide in this configuration
  task automatic sel_chain(input int c);
    logic [127:0] o;
    shift_ir(INSTR_SEL_SCAN_CHAIN);
    shift_dr(128'(c), 2, o);
    shift_ir(INSTR_SCAN_ACCESS);
  endtask

  task automatic breg_wr(input logic [2:0] a, input logic [31:0] d);
    logic [127:0] o;
    sel_chain(1);
    shift_dr({92'h0, 1'b1, a, d}, 36, o);
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1ms;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] o;
    logic [31:0] r3;
    int t;
    u_core.load_insn(32'h00, enc(1, 1, 16'd1));
    u_core.load_insn(32'h04, enc(1, 2, 16'd1));
    u_core.load_insn(32'h08, enc(3, 1, 16'h100));
    u_core.load_insn(32'h0C, enc(1, 3, 16'd1));
    u_core.load_insn(32'h10, enc(4, 3, 16'h00));
    #1 trst_n = 0;
    #5 trst_n = 1;
    tap_reset();
    shift_dr('0, 32, o);
    check("IDCODE", o[31:0], 32'h1000_0A5B);
    // CBM chain of a single core: {mask, value}, 2 bits, reset to {1, 0}
    sel_chain(2);
    shift_dr(128'b01, 2, o);
    check("CBM chain reset value", o[1:0], 2'b10);
    shift_dr(128'b01, 2, o);
    check("CBM chain written", o[1:0], 2'b01);
    breg_wr(BREG_ADDR_VAL, 32'h0C);
    breg_wr(BREG_CTRL, 32'h1);
    rst_n = 1;
    t = 0;
    while (!stop_mode_en[0] && t < 5000) begin
      @(posedge ext_clk[0]);
      t++;
    end
    check("stopped at the breakpoint", stop_mode_en[0], 1);
    check("cause", cause[0], CAUSE_ADDR);
    check("no cross trigger for a lone core", ext_bkpt_en[0], 0);
    check("store before the breakpoint done", u_core.dmem[64], u_core.regs[1]);
    check("breakpoint instruction not executed", u_core.regs[3], u_core.regs[1] - 1);
    check("restart pc", u_core.pc, 32'h0C);
    // read r1 through the bus chain (chain 0) with controlled pulses
    sel_chain(0);
    shift_dr({64'h0, enc(3, 1, 16'h0), 32'h0}, 64, o);
    shift_dr({64'h0, enc(0, 0, 16'h0), 32'h0}, 64, o);
    idle_cycles(6);
    shift_dr({64'h0, enc(0, 0, 16'h0), 32'h0}, 64, o);
    check("r1 read through the bus chain", o[31:0], u_core.regs[1]);
    // resume with the breakpoint off
    r3 = u_core.regs[3];
    breg_wr(BREG_CTRL, 32'h0);
    breg_wr(BREG_CMD, 32'h1);
    idle_cycles(20);
    check("resumed", stop_mode_en[0], 0);
    checks++;
    if (u_core.regs[3] == r3) begin
      failures++;
      $display("FAIL: core did not run on");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
