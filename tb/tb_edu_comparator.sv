// tb_edu_comparator: programs the breakpoint registers through the 36-bit
// register chain, reads them back, and drives random memory access signals,
// comparing int_bkpt_en / addr_hit / data_hit with a reference computed in
// the testbench from the programmed values. Also checks the STATUS
// register path and the debug_end command toggle.
module tb_edu_comparator;
  import mocd_pkg::*;

  logic tck = 0, trst_n = 1, tdi = 0, sel = 1, tdo;
  dr_ctrl_t dr = '0;
  mem_bus_t bus;
  logic stop_mode_en = 0;
  bkpt_cause_e cause = CAUSE_NONE;
  smc_state_e smc_state = SMC_RUN_MODE;
  logic int_bkpt_en, addr_hit, data_hit, debug_end_tgl, halt_req_tgl;
  int checks = 0, failures = 0;

  edu_comparator dut (.*);

  task automatic scan(input logic [35:0] din, output logic [35:0] dout);
    dr = '{capture: 1'b1, shift: 1'b0, update: 1'b0};
    #5 tck = 1; #5 tck = 0;
    dr = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
    for (int i = 0; i < 36; i++) begin
      tdi = din[i];
      #4 dout[i] = tdo;
      #1 tck = 1; #5 tck = 0;
    end
    dr = '{capture: 1'b0, shift: 1'b0, update: 1'b1};
    #5 tck = 1; #5 tck = 0;
    dr = '0;
  endtask

  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    logic [35:0] o;
    scan({1'b1, a, d}, o);
  endtask

  task automatic rd(input logic [2:0] a, output logic [31:0] d);
    logic [35:0] o;
    scan({1'b0, a, 32'h0}, o);
    scan({1'b0, a, 32'h0}, o);
    d = o[31:0];
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
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

  logic [31:0] av, am, dv, dm, r;
  logic [7:0]  ct;

  initial begin
    bus = '0;
    #1 trst_n = 0;
    #2 trst_n = 1;
    #1 check("disabled after reset", {31'b0, int_bkpt_en}, 0);
    for (int cfg = 0; cfg < 6; cfg++) begin
      av = $urandom() & 32'hFFFF_FFFC;
      am = (cfg % 2) ? 32'h0000_00FF : 32'h0;
      dv = $urandom();
      dm = (cfg > 3) ? 32'hFFFF_0000 : 32'h0;
      ct = 8'($urandom()) & 8'h1F;
      wr(BREG_ADDR_VAL, av); wr(BREG_ADDR_MASK, am);
      wr(BREG_DATA_VAL, dv); wr(BREG_DATA_MASK, dm);
      wr(BREG_CTRL, {24'h0, ct});
      rd(BREG_ADDR_VAL, r);  check("rb addr", r, av);
      rd(BREG_ADDR_MASK, r); check("rb amask", r, am);
      rd(BREG_DATA_VAL, r);  check("rb data", r, dv);
      rd(BREG_DATA_MASK, r); check("rb dmask", r, dm);
      rd(BREG_CTRL, r);      check("rb ctrl", r, {24'h0, ct});
      for (int k = 0; k < 60; k++) begin
        logic ea, ed, am_ok, dm_ok;
        logic [31:0] v;
        bus.fetch = $urandom_range(0, 1);
        bus.fetch_addr = (k % 3 == 0) ? (av ^ ($urandom() & am)) : $urandom();
        bus.rd = $urandom_range(0, 1);
        bus.wr = !bus.rd && $urandom_range(0, 1);
        bus.daddr = (k % 2 == 0) ? (av ^ ($urandom() & am)) : $urandom();
        bus.wdata = (k % 4 < 2) ? (dv ^ ($urandom() & dm)) : $urandom();
        bus.rdata = (k % 4 == 1) ? (dv ^ ($urandom() & dm)) : $urandom();
        #1;
        // reference
        ea = ct[0] && bus.fetch && ((bus.fetch_addr & ~am) == (av & ~am));
        v  = bus.wr ? bus.wdata : bus.rdata;
        am_ok = (bus.daddr & ~am) == (av & ~am);
        dm_ok = (v & ~dm) == (dv & ~dm);
        ed = ct[1] && ((bus.rd && ct[2]) || (bus.wr && ct[3])) && dm_ok && (!ct[4] || am_ok);
        check("addr_hit", {31'b0, addr_hit}, {31'b0, ea});
        check("data_hit", {31'b0, data_hit}, {31'b0, ed});
        check("int_bkpt_en", {31'b0, int_bkpt_en}, {31'b0, ea || ed});
      end
    end
    // status register path and debug_end command
    stop_mode_en = 1; cause = CAUSE_DATA; smc_state = SMC_STOP_MODE;
    rd(BREG_STATUS, r);
    check("status", r, {26'b0, SMC_STOP_MODE, CAUSE_DATA, 1'b1});
    r = {31'b0, debug_end_tgl};
    wr(BREG_CMD, 32'h1);
    check("debug_end toggles", {31'b0, debug_end_tgl}, ~r & 1);
    wr(BREG_CMD, 32'h0);
    check("no toggle on 0", {31'b0, debug_end_tgl}, ~r & 1);
    r = {31'b0, halt_req_tgl};
    wr(BREG_CMD, 32'h2);
    check("halt request toggles", {31'b0, halt_req_tgl}, ~r & 1);
    check("halt leaves debug_end alone", {31'b0, debug_end_tgl}, 1);
    wr(BREG_CMD, 32'h1);
    check("debug_end leaves halt alone", {31'b0, halt_req_tgl}, ~r & 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
