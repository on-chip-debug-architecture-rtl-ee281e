// tb_edu_scan_chain: shifts 64-bit {instruction, data} words into the EDU
// bus scan chain, checks that Update-DR delivers them to ir_insert and
// lsu_insert, that Capture-DR loads the IR and LSU values and that they
// come out on TDO LSB first, that the inserts change only at Update-DR,
// that an unselected chain keeps still and that nTRST clears the inserts.
module tb_edu_scan_chain;
  import mocd_pkg::*;

  logic tck = 0, trst_n = 1, tdi = 0, sel = 0, tdo;
  dr_ctrl_t dr = '0;
  logic [INSN_W-1:0] cap_ir, ir_insert;
  logic [DATA_W-1:0] cap_lsu, lsu_insert;
  int checks = 0, failures = 0;

  edu_scan_chain dut (.tck, .trst_n, .tdi, .dr, .sel, .tdo, .cap_ir, .cap_lsu,
                      .ir_insert, .lsu_insert);

  task automatic pulse();
    #5 tck = 1;
    #5 tck = 0;
  endtask

  task automatic scan(input logic [63:0] din, output logic [63:0] dout);
    dr = '{capture: 1'b1, shift: 1'b0, update: 1'b0};
    pulse();
    dr = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
    for (int i = 0; i < 64; i++) begin
      tdi = din[i];
      #4 dout[i] = tdo;
      #1 tck = 1;
      #5 tck = 0;
    end
    dr = '{capture: 1'b0, shift: 1'b0, update: 1'b1};
    pulse();
    dr = '0;
  endtask

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #50000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] out, w;
    cap_ir = 32'h1234_5678;
    cap_lsu = 32'h9ABC_DEF0;
    #1 trst_n = 0;
    #2 trst_n = 1;
    check("reset inserts", {ir_insert, lsu_insert}, '0);
    sel = 1;
    for (int n = 0; n < 16; n++) begin
      w = {$urandom(), $urandom()};
      scan(w, out);
      check("capture", out, {cap_ir, cap_lsu});
      check("update", {ir_insert, lsu_insert}, w);
      cap_ir = $urandom();
      cap_lsu = $urandom();
    end
    // capture and shift without update: the inserts hold until Update-DR
    w = {ir_insert, lsu_insert};
    dr = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
    for (int i = 0; i < 64; i++) begin
      tdi = ~w[i];
      pulse();
    end
    dr = '0;
    check("no update while shifting", {ir_insert, lsu_insert}, w);
    dr = '{capture: 1'b0, shift: 1'b0, update: 1'b1};
    pulse();
    dr = '0;
    check("update takes the shifted word", {ir_insert, lsu_insert}, ~w);
    // unselected: no update, TDO frozen
    w = {ir_insert, lsu_insert};
    sel = 0;
    scan(~w, out);
    check("unselected", {ir_insert, lsu_insert}, w);
    #1 trst_n = 0;
    #2 trst_n = 1;
    check("nTRST clears the inserts", {ir_insert, lsu_insert}, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
