// tb_tap_controller: walks the TAP controller through the standard TMS
// sequences (reset, IR scan, DR scan with pause, return to idle) and checks
// every state against the IEEE 1149.1 state sequence written out by hand,
// plus the decoded strobes and the asynchronous nTRST reset.
module tb_tap_controller;
  import mocd_pkg::*;

  logic tck = 0, trst_n = 1, tms = 1;
  tap_state_e state;
  dr_ctrl_t dr, ir;
  logic rti, tlr;
  int checks = 0, failures = 0;

  tap_controller dut (.tck, .trst_n, .tms, .state, .dr, .ir, .rti, .tlr);

  task automatic step(input logic t, input tap_state_e exp);
    tms = t;
    #5 tck = 1;
    #5 tck = 0;
    checks++;
    if (state !== exp) begin
      failures++;
      $display("FAIL: tms=%0b state=%s expected %s", t, state.name(), exp.name());
    end
  endtask

  initial begin
    #1000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 trst_n = 0;
    #2 trst_n = 1;
    checks++; if (state !== TAP_TLR || !tlr) begin failures++; $display("FAIL: strobe check 1"); end
    step(1, TAP_TLR);
    step(0, TAP_RTI);
    checks++; if (!rti) begin failures++; $display("FAIL: strobe check 2"); end
    step(0, TAP_RTI);
    // IR scan
    step(1, TAP_SEL_DR);
    step(1, TAP_SEL_IR);
    step(0, TAP_CAPTURE_IR);
    checks++; if (!ir.capture || dr.capture) begin failures++; $display("FAIL: strobe check 3"); end
    step(0, TAP_SHIFT_IR);
    checks++; if (!ir.shift) begin failures++; $display("FAIL: strobe check 4"); end
    step(0, TAP_SHIFT_IR);
    step(1, TAP_EXIT1_IR);
    step(0, TAP_PAUSE_IR);
    step(0, TAP_PAUSE_IR);
    step(1, TAP_EXIT2_IR);
    step(0, TAP_SHIFT_IR);
    step(1, TAP_EXIT1_IR);
    step(1, TAP_UPDATE_IR);
    checks++; if (!ir.update) begin failures++; $display("FAIL: strobe check 5"); end
    // DR scan straight from Update-IR
    step(1, TAP_SEL_DR);
    step(0, TAP_CAPTURE_DR);
    checks++; if (!dr.capture) begin failures++; $display("FAIL: strobe check 6"); end
    step(0, TAP_SHIFT_DR);
    checks++; if (!dr.shift) begin failures++; $display("FAIL: strobe check 7"); end
    step(1, TAP_EXIT1_DR);
    step(0, TAP_PAUSE_DR);
    step(1, TAP_EXIT2_DR);
    step(1, TAP_UPDATE_DR);
    checks++; if (!dr.update || dr.shift) begin failures++; $display("FAIL: strobe check 8"); end
    step(0, TAP_RTI);
    // five ones reach Test-Logic-Reset from anywhere
    step(1, TAP_SEL_DR);
    step(0, TAP_CAPTURE_DR);
    step(1, TAP_EXIT1_DR);
    step(1, TAP_UPDATE_DR);
    step(1, TAP_SEL_DR);
    step(1, TAP_SEL_IR);
    step(1, TAP_TLR);
    // asynchronous reset
    step(0, TAP_RTI);
    step(1, TAP_SEL_DR);
    #2 trst_n = 0;
    #1 checks++; if (state !== TAP_TLR) begin failures++; $display("FAIL: strobe check 9"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
