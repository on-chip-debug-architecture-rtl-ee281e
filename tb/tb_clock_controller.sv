// tb_clock_controller: counts rising edges of every core clock. In run mode
// each core clock must follow its own external clock; a core in stop mode
// must get no edges, except one TCK pulse per TCK cycle while the TAP is in
// Run-Test/Idle and the scan chain selection register names that core.
module tb_clock_controller;
  import mocd_pkg::*;

  localparam int N = 4;
  logic [N-1:0] ext_clk = '0, stop_mode_en = '0, debug_clk_en, core_clk;
  logic tck = 0, trst_n = 1, tap_rti = 0;
  logic [3:0] scan_sel = '0;
  int edges[N];
  int checks = 0, failures = 0;

  clock_controller #(.N_CORES(N), .SSEL_W(4)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_clk
    always #(3 + i) ext_clk[i] = ~ext_clk[i];
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
    #1 trst_n = 0;
    #1 trst_n = 1;
    // run mode: core clocks follow their ext clocks (ext_clk[i] period 2*(3+i))
    @(posedge ext_clk[N-1]);
    #0.5;
    foreach (edges[i]) edges[i] = 0;
    #840;
    for (int i = 0; i < N; i++) check($sformatf("run edges core%0d", i), edges[i], 840 / (2 * (3 + i)));
    // stop cores 1 and 2 at a rising edge of their clocks
    @(posedge ext_clk[1]); stop_mode_en[1] = 1;
    @(posedge ext_clk[2]); stop_mode_en[2] = 1;
    #1;
    foreach (edges[i]) edges[i] = 0;
    tck_cycles(10);
    check("stopped core1 no edges", edges[1], 0);
    check("stopped core2 no edges", edges[2], 0);
    // controlled pulses for core 2: scan_sel = 2, TAP in Run-Test/Idle
    scan_sel = 2; tap_rti = 1;
    tck_cycles(1);           // enable registers on the falling edge
    foreach (edges[i]) edges[i] = 0;
    tck_cycles(7);
    check("core2 pulses", edges[2], 7);
    check("core1 no pulses", edges[1], 0);
    tap_rti = 0;
    tck_cycles(1);
    edges[2] = 0;
    tck_cycles(5);
    check("no pulses outside RTI", edges[2], 0);
    check("debug_clk_en off", debug_clk_en[2], 0);
    // resume core 2
    stop_mode_en[2] = 0;
    edges[2] = 0;
    #100;
    checks++;
    if (edges[2] < 9 || edges[2] > 11) begin
      failures++;
      $display("FAIL resume edges %0d", edges[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
