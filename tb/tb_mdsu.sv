// tb_mdsu: checks the two MDSU parts working together: the CBM chain is
// programmed so that core 1 follows core 0 into stop mode; raising
// stop_mode_en[0] must raise ext_bkpt_en[1], core 0's clock must stop
// while core 1's keeps running, and in Run-Test/Idle with chain 0 selected
// core 0 must get exactly one pulse per TCK cycle. It also reads the CBM
// registers back through the chain, checks that pulses go only to the
// selected stopped core and that releasing core 0 releases the cross
// trigger and restarts core 0's clock.
module tb_mdsu;
  import mocd_pkg::*;

  localparam int N = 4;
  localparam int L = 2 * N * N;
  logic [N-1:0] ext_clk = '0, stop_mode_en = '0, ext_bkpt_en, debug_clk_en, core_clk;
  logic tck = 0, trst_n = 1, tdi = 0, tdo_cbm, sel_cbm = 0, tap_rti = 0;
  logic [3:0] scan_sel = '0;
  dr_ctrl_t dr = '0;
  int edges[N];
  int checks = 0, failures = 0;

  mdsu #(.N_CORES(N), .SSEL_W(4)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_clk
    always #5 ext_clk[i] = ~ext_clk[i];
    always @(posedge core_clk[i]) edges[i]++;
  end

  task automatic tck_cycles(input int n);
    repeat (n) begin
      #25 tck = 1;
      #25 tck = 0;
    end
  endtask

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N*N-1:0] v, m;
    #1 trst_n = 0;
    #1 trst_n = 1;
    v = '0; m = '1;
    v[1*N+0] = 1'b1; m[1*N+0] = 1'b0;
    sel_cbm = 1;
    dr = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
    for (int i = 0; i < L; i++) begin
      tdi = (i < N * N) ? v[i] : m[i - N * N];
      tck_cycles(1);
    end
    dr = '{capture: 1'b0, shift: 1'b0, update: 1'b1};
    tck_cycles(1);
    dr = '0; sel_cbm = 0;
    check("no cross trigger while running", ext_bkpt_en, 0);
    @(posedge ext_clk[0]); stop_mode_en[0] = 1;
    #1 check("core1 forced", ext_bkpt_en, 4'b0010);
    foreach (edges[i]) edges[i] = 0;
    #200;
    check("core0 clock stopped", edges[0], 0);
    check("core1 clock runs", edges[1], 20);
    scan_sel = 0; tap_rti = 1;
    tck_cycles(1);
    edges[0] = 0;
    tck_cycles(4);
    check("core0 controlled pulses", edges[0], 4);
    check("debug_clk_en", debug_clk_en, 4'b0001);
    check("core 2 keeps its own clock", edges[2] > 0 ? 1 : 0, 1);
    // pulses to a core that is selected but running change nothing
    scan_sel = 1;
    tck_cycles(1);
    foreach (edges[i]) edges[i] = 0;
    tck_cycles(2);
    check("core1 still on its own clock (10 edges per TCK cycle)", edges[1], 10);
    check("core0 gets no pulses when not selected", edges[0], 0);
    tap_rti = 0;
    // read the CBM registers back
    begin
      logic [L-1:0] rb;
      sel_cbm = 1;
      dr = '{capture: 1'b1, shift: 1'b0, update: 1'b0};
      tck_cycles(1);
      dr = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
      for (int i = 0; i < L; i++) begin
        rb[i] = tdo_cbm;
        tdi = (i < N * N) ? v[i] : m[i - N * N];
        tck_cycles(1);
      end
      dr = '0; sel_cbm = 0;
      check("CBM value register read back", rb[N*N-1:0], v);
      check("CBM mask register read back", rb[L-1:N*N], m);
    end
    // core 0 resumes: the cross trigger drops and its clock runs again
    @(posedge ext_clk[0]); stop_mode_en[0] = 0;
    #1 check("cross trigger released", ext_bkpt_en, 0);
    edges[0] = 0;
    #200;
    check("core0 clock back", edges[0], 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
