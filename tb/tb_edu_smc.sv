// tb_edu_smc: drives the switch mode controller with breakpoint events and
// status info and checks the state sequence RUN_MODE, RECOG_BKPT,
// ANALYZE_CORE, DEBUG_CONTROL, WAIT, STOP_MODE, the cycle at which
// stop_mode_en rises, the one-cycle flush, WAIT holding until stop_point,
// the cancelled breakpoint after a taken branch, the external breakpoint
// edge, the debugger halt request and the debug_end return to run mode.
module tb_edu_smc;
  import mocd_pkg::*;

  logic clk = 0, rst_n = 1;
  logic int_bkpt_en = 0, addr_hit = 0, ext_bkpt_en = 0, debug_end_tgl = 0;
  logic halt_req_tgl = 0;
  logic [ADDR_W-1:0] fetch_addr = '0;
  status_info_t status = '{branch_taken: 1'b0, pipe_empty: 1'b1};
  logic stop_mode_en;
  debug_ctrl_t debug_ctrl;
  bkpt_cause_e cause;
  smc_state_e state;
  int checks = 0, failures = 0;
  int flush_cycles;

  edu_smc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (debug_ctrl.flush) flush_cycles++;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    #20000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 rst_n = 0;
    #2 rst_n = 1;
    tick(3);
    check("reset state", state, SMC_RUN_MODE);
    // ---- address breakpoint, stop_point immediately -----------------------
    flush_cycles = 0;
    int_bkpt_en = 1; addr_hit = 1; fetch_addr = 32'h0000_0108;
    tick();
    int_bkpt_en = 0; addr_hit = 0; fetch_addr = 32'h0000_010C;
    check("recog", state, SMC_RECOG_BKPT);
    check("cause addr", cause, CAUSE_ADDR);
    tick(); check("analyze", state, SMC_ANALYZE_CORE);
    tick(); check("debug control", state, SMC_DEBUG_CONTROL);
    check("flush", debug_ctrl.flush, 1);
    check("precise", debug_ctrl.precise, 1);
    check("flush_pc", debug_ctrl.flush_pc, 32'h108);
    tick(); check("wait", state, SMC_WAIT);
    check("hold", debug_ctrl.hold, 1);
    check("stop not yet", stop_mode_en, 0);
    tick(); check("stop 4 cycles after detection", stop_mode_en, 1);
    check("one flush cycle", flush_cycles, 1);
    tick(10); check("stays stopped", state, SMC_STOP_MODE);
    debug_end_tgl = ~debug_end_tgl;
    tick(2); check("still stopped during sync", stop_mode_en, 1);
    tick(); check("debug_end resumes", state, SMC_RUN_MODE);
    // ---- data breakpoint, WAIT until pipe drains --------------------------
    status.pipe_empty = 0;
    int_bkpt_en = 1;
    tick(); int_bkpt_en = 0;
    check("cause data", cause, CAUSE_DATA);
    tick(2); check("not precise", debug_ctrl.precise, 0);
    tick(5); check("waits for stop_point", state, SMC_WAIT);
    status.pipe_empty = 1;
    tick(); check("stop at stop_point", state, SMC_STOP_MODE);
    debug_end_tgl = ~debug_end_tgl;
    tick(3); check("resume 2", state, SMC_RUN_MODE);
    // ---- taken branch ahead of an address breakpoint -----------------------
    int_bkpt_en = 1; addr_hit = 1;
    tick(); int_bkpt_en = 0; addr_hit = 0;
    status.branch_taken = 1;
    tick(); status.branch_taken = 0;
    tick(); check("branch cancels breakpoint", state, SMC_RUN_MODE);
    check("cause cleared", cause, CAUSE_NONE);
    // ---- external breakpoint (rising edge) --------------------------------
    ext_bkpt_en = 1;
    tick(3); check("ext recog", state, SMC_RECOG_BKPT);
    check("cause ext", cause, CAUSE_EXT);
    tick(4); check("ext stop", state, SMC_STOP_MODE);
    debug_end_tgl = ~debug_end_tgl;
    tick(3); check("resume 3", state, SMC_RUN_MODE);
    tick(10); check("level ext does not re-stop", state, SMC_RUN_MODE);
    // ---- debugger halt request (toggle) -----------------------------------
    halt_req_tgl = ~halt_req_tgl;
    tick(2); check("halt waits for the synchroniser", state, SMC_RUN_MODE);
    tick(); check("halt recog", state, SMC_RECOG_BKPT);
    check("cause halt", cause, CAUSE_EXT);
    check("halt not precise", debug_ctrl.precise, 0);
    tick(4); check("halt stop", state, SMC_STOP_MODE);
    halt_req_tgl = ~halt_req_tgl;
    tick(5); check("halt while stopped is ignored", state, SMC_STOP_MODE);
    debug_end_tgl = ~debug_end_tgl;
    tick(3); check("resume 4", state, SMC_RUN_MODE);
    tick(10); check("no second stop", state, SMC_RUN_MODE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
