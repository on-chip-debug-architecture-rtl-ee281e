// tb_cbm: programs random stop mode value and mask registers through the
// CBM chain, reads them back, and for random stop_mode_en patterns compares
// every ext_bkpt_en with a reference evaluated in the testbench: all
// unmasked other cores match the value bits, and at least one is unmasked.
module tb_cbm;
  import mocd_pkg::*;

  localparam int N = 4;
  localparam int L = 2 * N * N;
  logic tck = 0, trst_n = 1, tdi = 0, sel = 1, tdo;
  dr_ctrl_t dr = '0;
  logic [N-1:0] stop_mode_en = '0, ext_bkpt_en;
  int checks = 0, failures = 0;

  cbm #(.N_CORES(N)) dut (.*);

  task automatic scan(input logic [L-1:0] din, output logic [L-1:0] dout);
    dr = '{capture: 1'b1, shift: 1'b0, update: 1'b0};
    #5 tck = 1; #5 tck = 0;
    dr = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
    for (int i = 0; i < L; i++) begin
      tdi = din[i];
      #4 dout[i] = tdo;
      #1 tck = 1; #5 tck = 0;
    end
    dr = '{capture: 1'b0, shift: 1'b0, update: 1'b1};
    #5 tck = 1; #5 tck = 0;
    dr = '0;
  endtask

  function automatic logic [N-1:0] ref_ext(input logic [N*N-1:0] v, input logic [N*N-1:0] m,
                                           input logic [N-1:0] s);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) begin
      int unmasked = 0;
      r[i] = 1'b1;
      for (int j = 0; j < N; j++) begin
        if (j != i && !m[i*N+j]) begin
          unmasked++;
          if (s[j] != v[i*N+j]) r[i] = 1'b0;
        end
      end
      if (unmasked == 0) r[i] = 1'b0;
    end
    return r;
  endfunction

  task automatic check(input string what, input logic [L-1:0] got, input logic [L-1:0] exp);
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
    logic [N*N-1:0] v, m;
    logic [L-1:0] o;
    #1 trst_n = 0;
    #1 trst_n = 1;
    for (int k = 0; k < 16; k++) begin
      stop_mode_en = N'($urandom());
      #1 check("reset: no cross trigger", L'(ext_bkpt_en), '0);
    end
    // core 1 follows core 0 (the usual use)
    v = '0; m = '1;
    v[1*N+0] = 1'b1; m[1*N+0] = 1'b0;
    scan({m, v}, o);
    check("readback reset", o, {{(N*N){1'b1}}, {(N*N){1'b0}}});
    stop_mode_en = 4'b0001;
    #1 check("core0 stop forces core1", L'(ext_bkpt_en), L'(4'b0010));
    stop_mode_en = 4'b0000;
    #1 check("core0 running", L'(ext_bkpt_en), '0);
    for (int cfg = 0; cfg < 8; cfg++) begin
      o = {m, v};
      v = (N * N)'($urandom());
      m = (N * N)'($urandom()) & (N * N)'($urandom());
      scan({m, v}, o);
      scan({m, v}, o);
      check("readback", o, {m, v});
      for (int s = 0; s < (1 << N); s++) begin
        stop_mode_en = N'(s);
        #1 check("ext_bkpt_en", L'(ext_bkpt_en), L'(ref_ext(v, m, N'(s))));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
