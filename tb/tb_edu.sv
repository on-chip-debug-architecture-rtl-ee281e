// tb_edu: one EDU attached to the behavioural core model. An address
// breakpoint is programmed through the breakpoint-register chain; the core
// must stop with the instruction before the breakpoint completed and the
// breakpoint instruction not executed, within a fixed number of cycles of
// the breakpoint fetch. Then a register is read through the bus chain
// (inserted STR executed by controlled clock pulses, result captured from
// the LSU), a register is written (inserted LDR with data from the chain),
// and the debug_end command returns the core to run mode.
module tb_edu;
  import mocd_pkg::*;

  logic clk = 0, rst_n = 1;
  logic tck = 0, trst_n = 1, tdi = 0, sel_bus = 0, sel_regs = 0, tdo_bus, tdo_regs;
  dr_ctrl_t dr = '0;
  logic ext_bkpt_en = 0, stop_mode_en;
  mem_bus_t bus;
  status_info_t status;
  debug_ctrl_t debug_ctrl;
  logic [INSN_W-1:0] cap_ir, ir_insert;
  logic [DATA_W-1:0] cap_lsu, lsu_insert;
  bkpt_cause_e cause;
  smc_state_e smc_state;
  logic core_clk;
  int checks = 0, failures = 0;

  edu dut (.*);
  // core clock: the external clock in run mode, TCK pulses in stop mode
  logic pulse_en = 0;
  assign core_clk = stop_mode_en ? (tck & pulse_en) : clk;
  mini_core u_core (.clk(core_clk), .rst_n, .stop_mode_en, .debug_ctrl, .ir_insert,
                    .lsu_insert, .bus, .status, .cap_ir, .cap_lsu);

  always #5 clk = ~clk;

  task automatic tcyc();
    #10 tck = 1; #10 tck = 0;
  endtask

  task automatic scan(input logic is_bus, input logic [63:0] din, input int len,
                      output logic [63:0] dout);
    sel_bus = is_bus; sel_regs = !is_bus;
    dr = '{capture: 1'b1, shift: 1'b0, update: 1'b0}; tcyc();
    dr = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
    for (int i = 0; i < len; i++) begin
      tdi = din[i];
      #9 dout[i] = is_bus ? tdo_bus : tdo_regs;
      #1 tck = 1; #10 tck = 0;
    end
    dr = '{capture: 1'b0, shift: 1'b0, update: 1'b1}; tcyc();
    dr = '0; sel_bus = 0; sel_regs = 0;
  endtask

  task automatic breg(input logic [2:0] a, input logic [31:0] d);
    logic [63:0] o;
    scan(1'b0, {28'h0, 1'b1, a, d}, 36, o);
  endtask

  task automatic pulses(input int n);
    pulse_en = 1;
    repeat (n) tcyc();
    pulse_en = 0;
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] enc(input logic [3:0] o, input logic [3:0] r, input logic [15:0] i);
    return {o, r, 8'h0, i};
  endfunction

  initial begin
    #100000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fetch_cycle, stop_cycle, cyc;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (dut.int_bkpt_en && fetch_cycle < 0) fetch_cycle = cyc;

  initial begin
    logic [63:0] o;
    int r3_at_stop;
    int lat1;
    fetch_cycle = -1;
    u_core.load_insn(32'h00, enc(1, 1, 16'd1));
    u_core.load_insn(32'h04, enc(1, 2, 16'd1));
    u_core.load_insn(32'h08, enc(3, 1, 16'h100));
    u_core.load_insn(32'h0C, enc(1, 3, 16'd1));
    u_core.load_insn(32'h10, enc(4, 3, 16'h00));
    u_core.load_insn(32'h14, enc(1, 4, 16'd1));
    #1 rst_n = 0; trst_n = 0;
    #2 trst_n = 1;
    breg(BREG_ADDR_VAL, 32'h0C);
    breg(BREG_ADDR_MASK, 32'h0);
    #1 rst_n = 1;
    // let the loop run a few times before arming the breakpoint
    repeat (30) @(posedge clk);
    fetch_cycle = -1;
    breg(BREG_CTRL, 32'h1);
    wait (stop_mode_en);
    stop_cycle = cyc;
    $display("stop_mode_en %0d cycles after the breakpoint fetch", stop_cycle - fetch_cycle);
    checks++;
    if (stop_cycle - fetch_cycle != 5 || fetch_cycle < 0) begin
      failures++;
      $display("FAIL: stop %0d cycles after breakpoint fetch", stop_cycle - fetch_cycle);
    end
    check("cause", cause, CAUSE_ADDR);
    check("r1 == r2", u_core.regs[1], u_core.regs[2]);
    check("previous instruction done", u_core.dmem[32'h100 >> 2], u_core.regs[1]);
    check("breakpoint instruction not executed", u_core.regs[3], u_core.regs[1] - 1);
    check("restart pc", u_core.pc, 32'h0C);
    check("r4 untouched", u_core.regs[4], 0);
    r3_at_stop = u_core.regs[3];
    // read r1: insert STR r1, run it to the MEMORY stage, capture the LSU
    scan(1'b1, {enc(3, 1, 16'h0), 32'h0}, 64, o);
    pulses(1);
    scan(1'b1, {enc(0, 0, 16'h0), 32'h0}, 64, o);
    pulses(4);
    scan(1'b1, {enc(0, 0, 16'h0), 32'h0}, 64, o);
    check("r1 read through scan chain", o[31:0], u_core.regs[1]);
    // write r5: insert LDR r5 with the data word
    scan(1'b1, {enc(2, 5, 16'h0), 32'hCAFE_0005}, 64, o);
    pulses(1);
    scan(1'b1, {enc(0, 0, 16'h0), 32'hCAFE_0005}, 64, o);
    pulses(5);
    check("r5 written through scan chain", u_core.regs[5], 32'hCAFE_0005);
    check("still stopped", stop_mode_en, 1);
    // disable the breakpoint and resume
    breg(BREG_CTRL, 32'h0);
    breg(BREG_CMD, 32'h1);
    repeat (10) @(posedge clk);
    check("resumed", stop_mode_en, 0);
    repeat (40) @(posedge clk);
    checks++;
    if (u_core.regs[3] <= r3_at_stop) begin
      failures++;
      $display("FAIL: core did not run on");
    end
    check("resumed at the breakpoint address, loop intact", u_core.regs[1] - u_core.regs[2], 0);
    // a multi-cycle instruction just before the breakpoint: the store at
    // 0x08 becomes LDM r8..r11 (4 words, 3 stall cycles); the stop point
    // must wait for it, so the stop comes exactly 3 cycles later
    for (int w = 0; w < 4; w++) u_core.write_data(32'h200 + 4 * w, 32'h5100 + w);
    u_core.load_insn(32'h08, {4'd5, 4'd8, 8'd4, 16'h200});
    repeat (20) @(posedge clk);
    for (int r = 8; r < 12; r++) u_core.regs[r] = '0;
    lat1 = stop_cycle - fetch_cycle;
    fetch_cycle = -1;
    breg(BREG_CTRL, 32'h1);
    wait (stop_mode_en);
    stop_cycle = cyc;
    $display("with LDM: stop_mode_en %0d cycles after the breakpoint fetch", stop_cycle - fetch_cycle);
    check("stop waits for the multi-cycle instruction", stop_cycle - fetch_cycle, lat1 + 3);
    for (int r = 8; r < 12; r++) check("LDM completed before the stop", u_core.regs[r], 32'h5100 + r - 8);
    check("breakpoint instruction not executed (LDM)", u_core.regs[3], u_core.regs[1] - 1);
    check("restart pc (LDM)", u_core.pc, 32'h0C);
    check("stopped with an empty pipeline", {31'h0, u_core.status.pipe_empty}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
