// tb_mocd_top: end-to-end test of the MOCD infrastructure at its default
// size (four cores) with four behavioural core models, all driven through
// the single external JTAG port. Every core runs the same loop
//   0x00 ADDI r1,1 / 0x04 ADDI r2,1 / 0x08 STR r1,[0x100] / 0x0C ADDI r3,1 /
//   0x10 BNEZ r3,0x00 / 0x14 ADDI r4,1 (never reached)
// Scenario: core 0 address breakpoint at 0x0C with core 1 cross-stopped by
// the CBM; core 2 data value breakpoint on a store of 7; core 3 address
// breakpoint at 0x04. After all four stop, the test checks the causes and
// the precise stop points, reads a status register, reads and writes core
// registers through the bus scan chain with controlled clock pulses,
// single-steps core 3 by moving its breakpoint, lets core 0 resume with a
// breakpoint behind a taken branch (cancelled every loop), uses the SEL pin
// to reach an internal JTAG port, resumes everything, halts core 2 alone by
// a debugger halt request and resumes it again, then stops core 3 from
// another IP's debug request line and resumes it. Each mechanism is
// counted and must occur at least once.
module tb_mocd_top;
  import mocd_pkg::*;

  localparam int N = 4;
  localparam time TCK_HALF = 20;

  logic [N-1:0] ext_clk = '0;
  logic rst_n = 0;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, sel = 0, tdo, tdo_oe;
  logic [3:0] ip_tck, ip_tms, ip_tdi, ip_trst_n, ip_tdo = '0;
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
  int n_addr_bkpt = 0, n_data_bkpt = 0, n_cross_bkpt = 0, n_branch_cancel = 0;
  int n_ctrl_pulses = 0, n_scan_read = 0, n_scan_write = 0, n_single_step = 0;
  int n_sel_pass = 0, n_resume = 0, n_halt = 0, n_ip_req = 0;

  mocd_top dut (.*);

  `include "jtag_host.svh"

  function automatic logic [31:0] enc(input logic [3:0] o, input logic [3:0] r, input logic [15:0] i);
    return {o, r, 8'h0, i};
  endfunction

  for (genvar i = 0; i < N; i++) begin : g_core
    mini_core u_core (.clk(core_clk[i]), .rst_n, .stop_mode_en(stop_mode_en[i]),
                      .debug_ctrl(debug_ctrl[i]), .ir_insert(ir_insert[i]),
                      .lsu_insert(lsu_insert[i]), .bus(bus[i]), .status(status[i]),
                      .cap_ir(cap_ir[i]), .cap_lsu(cap_lsu[i]));
    always #(5 + i) ext_clk[i] = ~ext_clk[i];
    initial begin
      u_core.load_insn(32'h00, enc(1, 1, 16'd1));
      u_core.load_insn(32'h04, enc(1, 2, 16'd1));
      u_core.load_insn(32'h08, enc(3, 1, 16'h100));
      u_core.load_insn(32'h0C, enc(1, 3, 16'd1));
      u_core.load_insn(32'h10, enc(4, 3, 16'h00));
      u_core.load_insn(32'h14, enc(1, 4, 16'd1));
    end
    // mechanism monitors
    always @(posedge stop_mode_en[i]) begin
      if (cause[i] == CAUSE_ADDR) n_addr_bkpt++;
      if (cause[i] == CAUSE_DATA) n_data_bkpt++;
      if (cause[i] == CAUSE_EXT)  n_cross_bkpt++;
    end
    always @(negedge stop_mode_en[i]) n_resume++;
    smc_state_e prev;
    always @(posedge ext_clk[i]) begin
      if (prev == SMC_ANALYZE_CORE && smc_state[i] == SMC_RUN_MODE) n_branch_cancel++;
      prev <= smc_state[i];
    end
    always @(posedge core_clk[i]) if (stop_mode_en[i]) n_ctrl_pulses++;
  end

  // ---- JTAG helpers -----------------------------------------------------
  task automatic sel_chain(input int c);
    logic [127:0] o;
    shift_ir(INSTR_SEL_SCAN_CHAIN);
    shift_dr(128'(c), 4, o);
    shift_ir(INSTR_SCAN_ACCESS);
  endtask

  task automatic breg_wr(input int core, input logic [2:0] a, input logic [31:0] d);
    logic [127:0] o;
    sel_chain(N + core);
    shift_dr({92'h0, 1'b1, a, d}, 36, o);
  endtask

  task automatic breg_rd(input int core, input logic [2:0] a, output logic [31:0] d);
    logic [127:0] o;
    sel_chain(N + core);
    shift_dr({92'h0, 1'b0, a, 32'h0}, 36, o);
    shift_dr({92'h0, 1'b0, a, 32'h0}, 36, o);
    d = o[31:0];
  endtask

  // read register r of a stopped core: insert STR, clock it to MEMORY,
  // capture the LSU store data
  task automatic read_reg(input int core, input logic [3:0] r, output logic [31:0] v);
    logic [127:0] o;
    sel_chain(core);
    shift_dr({64'h0, enc(3, r, 16'h0), 32'h0}, 64, o);
    shift_dr({64'h0, enc(0, 0, 16'h0), 32'h0}, 64, o);
    idle_cycles(6);
    shift_dr({64'h0, enc(0, 0, 16'h0), 32'h0}, 64, o);
    idle_cycles(4);
    v = o[31:0];
  endtask

  // write register r of a stopped core: insert LDR with the data word
  task automatic write_reg(input int core, input logic [3:0] r, input logic [31:0] v);
    logic [127:0] o;
    sel_chain(core);
    shift_dr({64'h0, enc(2, r, 16'h0), v}, 64, o);
    shift_dr({64'h0, enc(0, 0, 16'h0), v}, 64, o);
    idle_cycles(8);
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wait_stopped(input logic [N-1:0] m);
    int t = 0;
    while ((stop_mode_en & m) != m && t < 20000) begin
      @(posedge ext_clk[0]);
      t++;
    end
    check("stopped in time", 32'(stop_mode_en & m), 32'(m));
  endtask

  initial begin
    #2ms;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] o;
    logic [31:0] v, r1;
    logic [15:0] cv, cm;
    logic [31:0] pc2;
    #1 trst_n = 0;
    #5 trst_n = 1;
    tap_reset();
    shift_dr('0, 32, o);
    check("IDCODE", o[31:0], 32'h1000_0A5B);
    // cross breakpoint: core 1 follows core 0 into stop mode
    cv = '0; cm = '1;
    cv[1*N+0] = 1'b1; cm[1*N+0] = 1'b0;
    sel_chain(2 * N);
    shift_dr({96'h0, cm, cv}, 32, o);
    shift_dr({96'h0, cm, cv}, 32, o);
    check("CBM registers", o[31:0], {cm, cv});
    // breakpoints
    breg_wr(0, BREG_ADDR_VAL, 32'h0C);
    breg_wr(0, BREG_CTRL, 32'h1);
    breg_wr(2, BREG_DATA_VAL, 32'd7);
    breg_wr(2, BREG_CTRL, 32'h0A);      // data breakpoint on stores
    breg_wr(3, BREG_ADDR_VAL, 32'h04);
    breg_wr(3, BREG_CTRL, 32'h1);
    breg_rd(0, BREG_ADDR_VAL, v);
    check("breakpoint register read back", v, 32'h0C);
    rst_n = 1;
    wait_stopped(4'b1111);
    check("core0 cause", cause[0], CAUSE_ADDR);
    check("core1 cause", cause[1], CAUSE_EXT);
    check("core2 cause", cause[2], CAUSE_DATA);
    check("core3 cause", cause[3], CAUSE_ADDR);
    // precise stop points
    check("core0 r1==r2", g_core[0].u_core.regs[2], g_core[0].u_core.regs[1]);
    check("core0 r3==r1-1", g_core[0].u_core.regs[3], g_core[0].u_core.regs[1] - 1);
    check("core0 store done", g_core[0].u_core.dmem[64], g_core[0].u_core.regs[1]);
    check("core0 restart pc", g_core[0].u_core.pc, 32'h0C);
    check("core2 stored 7", g_core[2].u_core.dmem[64], 32'd7);
    check("core3 pc", g_core[3].u_core.pc, 32'h04);
    check("core3 r1", g_core[3].u_core.regs[1], 1);
    check("core3 r2", g_core[3].u_core.regs[2], 0);
    breg_rd(1, BREG_STATUS, v);
    check("core1 status", v, {26'h0, SMC_STOP_MODE, CAUSE_EXT, 1'b1});
    // register read and write through the scan chain
    pc2 = g_core[2].u_core.pc;
    read_reg(0, 4'd1, r1);
    check("read r1 of core0", r1, g_core[0].u_core.regs[1]);
    if (r1 == g_core[0].u_core.regs[1]) n_scan_read++;
    write_reg(0, 4'd5, 32'h5A5A_0005);
    check("write r5 of core0", g_core[0].u_core.regs[5], 32'h5A5A_0005);
    if (g_core[0].u_core.regs[5] == 32'h5A5A_0005) n_scan_write++;
    check("core2 not clocked meanwhile", g_core[2].u_core.pc, pc2);
    check("core0 still stopped", stop_mode_en[0], 1);
    // single step core 3: breakpoint on the next address, resume
    breg_wr(3, BREG_ADDR_VAL, 32'h08);
    breg_wr(3, BREG_CMD, 32'h1);
    idle_cycles(4);
    wait_stopped(4'b1000);
    check("core3 stepped one instruction: r2", g_core[3].u_core.regs[2], 1);
    check("core3 pc after step", g_core[3].u_core.pc, 32'h08);
    if (g_core[3].u_core.pc == 32'h08) n_single_step++;
    // core 0: breakpoint behind the taken branch, resume cores 0 and 1
    breg_wr(0, BREG_ADDR_VAL, 32'h14);
    breg_wr(0, BREG_CMD, 32'h1);
    breg_wr(1, BREG_CMD, 32'h1);
    idle_cycles(200);
    check("core0 runs on past the cancelled breakpoint", stop_mode_en[0], 0);
    check("core1 runs", stop_mode_en[1], 0);
    check("0x14 never executed", g_core[0].u_core.regs[4], 0);
    // SEL: reach internal JTAG port 1
    shift_ir(INSTR_SEL_JTAG);
    shift_dr(128'd1, 2, o);
    sel = 1;
    ip_tdo = 4'b0010;
    #1 check("TDO from internal port 1", tdo, 1);
    tck = 1; #1;
    check("TCK to internal port 1", ip_tck, 4'b0010);
    if (ip_tck == 4'b0010) n_sel_pass++;
    tck = 0; #1;
    sel = 0;
    // resume cores 2 and 3 with breakpoints off
    breg_wr(2, BREG_CTRL, 32'h0);
    breg_wr(3, BREG_CTRL, 32'h0);
    breg_wr(2, BREG_CMD, 32'h1);
    breg_wr(3, BREG_CMD, 32'h1);
    idle_cycles(20);
    check("all cores running", 32'(stop_mode_en), 0);
    // debugger halt request to core 2 only, then resume it
    breg_wr(2, BREG_CMD, 32'h2);
    idle_cycles(4);
    wait_stopped(4'b0100);
    check("halt stops core 2 alone", 32'(stop_mode_en), 32'b0100);
    check("halt cause", cause[2], CAUSE_EXT);
    v = g_core[2].u_core.regs[3];
    idle_cycles(20);
    check("halted core 2 stays put", g_core[2].u_core.regs[3], v);
    if (stop_mode_en == 4'b0100) n_halt++;
    breg_wr(2, BREG_CMD, 32'h1);
    idle_cycles(20);
    check("core 2 runs after halt", 32'(stop_mode_en), 0);
    checks++;
    if (g_core[2].u_core.regs[3] == v) begin
      failures++;
      $display("FAIL: core 2 did not run on after the halt");
    end
    // debug request from another IP stops core 3; the request is held
    // while the core stays stopped and released before the resume
    @(posedge ext_clk[3]) ip_dbg_req[3] = 1'b1;
    wait_stopped(4'b1000);
    check("IP request stops core 3 alone", 32'(stop_mode_en), 32'b1000);
    check("IP request cause", cause[3], CAUSE_EXT);
    if (stop_mode_en == 4'b1000) n_ip_req++;
    ip_dbg_req[3] = 1'b0;
    breg_wr(3, BREG_CMD, 32'h1);
    idle_cycles(20);
    check("core 3 runs after the IP request", 32'(stop_mode_en), 0);
    // every mechanism must have happened
    check("address breakpoints", 32'(n_addr_bkpt >= 3), 1);
    check("data breakpoint", 32'(n_data_bkpt >= 1), 1);
    check("cross breakpoint", 32'(n_cross_bkpt >= 1), 1);
    check("branch-cancelled breakpoint", 32'(n_branch_cancel >= 1), 1);
    check("controlled clock pulses", 32'(n_ctrl_pulses >= 1), 1);
    check("scan read", 32'(n_scan_read >= 1), 1);
    check("scan write", 32'(n_scan_write >= 1), 1);
    check("single step", 32'(n_single_step >= 1), 1);
    check("SEL pass-through", 32'(n_sel_pass >= 1), 1);
    check("resume", 32'(n_resume >= 5), 1);
    check("debugger halt", 32'(n_halt >= 1), 1);
    check("IP debug request", 32'(n_ip_req >= 1), 1);
    $display("mechanisms: addr_bkpt=%0d data_bkpt=%0d cross_bkpt=%0d branch_cancel=%0d ctrl_pulses=%0d scan_read=%0d scan_write=%0d single_step=%0d sel_pass=%0d resume=%0d halt=%0d ip_req=%0d",
             n_addr_bkpt, n_data_bkpt, n_cross_bkpt, n_branch_cancel, n_ctrl_pulses,
             n_scan_read, n_scan_write, n_single_step, n_sel_pass, n_resume, n_halt, n_ip_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
