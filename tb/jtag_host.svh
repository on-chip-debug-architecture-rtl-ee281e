// jtag_host.svh: JTAG host tasks shared by the testbenches that drive a TAP
// through its pins. Include inside a module that declares logic tck, tms,
// tdi and tdo and a time constant TCK_HALF. Each task starts and ends in
// Run-Test/Idle. Bits are shifted LSB first; TDO is sampled just before the
// rising TCK edge that shifts the bit out.
`ifndef JTAG_HOST_SVH
`define JTAG_HOST_SVH

task automatic tck_cycle(input logic tms_v, input logic tdi_v, output logic tdo_v);
  tms = tms_v;
  tdi = tdi_v;
  #(TCK_HALF);
  tdo_v = tdo;
  tck = 1'b1;
  #(TCK_HALF);
  tck = 1'b0;
endtask

task automatic tap_reset();
  logic d;
  for (int i = 0; i < 6; i++) tck_cycle(1'b1, 1'b0, d);
  tck_cycle(1'b0, 1'b0, d);  // Run-Test/Idle
endtask

task automatic shift_ir(input logic [3:0] code);
  logic d;
  tck_cycle(1'b1, 1'b0, d);  // Select-DR
  tck_cycle(1'b1, 1'b0, d);  // Select-IR
  tck_cycle(1'b0, 1'b0, d);  // Capture-IR
  tck_cycle(1'b0, 1'b0, d);  // Shift-IR
  for (int i = 0; i < 4; i++) tck_cycle(i == 3, code[i], d);
  tck_cycle(1'b1, 1'b0, d);  // Update-IR
  tck_cycle(1'b0, 1'b0, d);  // Run-Test/Idle
endtask

task automatic shift_dr(input logic [127:0] din, input int len, output logic [127:0] dout);
  logic d;
  dout = '0;
  tck_cycle(1'b1, 1'b0, d);  // Select-DR
  tck_cycle(1'b0, 1'b0, d);  // Capture-DR
  tck_cycle(1'b0, 1'b0, d);  // Shift-DR
  for (int i = 0; i < len; i++) begin
    tck_cycle(i == len - 1, din[i], d);
    dout[i] = d;
  end
  tck_cycle(1'b1, 1'b0, d);  // Update-DR
  tck_cycle(1'b0, 1'b0, d);  // Run-Test/Idle
endtask

task automatic idle_cycles(input int n);
  logic d;
  for (int i = 0; i < n; i++) tck_cycle(1'b0, 1'b0, d);
endtask

`endif
