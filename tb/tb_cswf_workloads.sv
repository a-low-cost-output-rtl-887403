// Workload testbench of the CSWF BIST system at its default size: the
// dynamic-range sweep (stimulus amplitude -60 .. -4 dBFS at about 1 kHz of a
// 6.144 MHz clock) and the frequency sweep (-6 dBFS, about 1, 4, 8, 10 kHz).
// Each test runs the three steps as a host would (offset, amplitude, set the
// reference amplitude from Y_AMP, THD+N power) with the behavioural
// modulator (gain 0.5) and computes SNDR = (A^2/2) / P_THDN.
// The host divides Y_AMP by the decimator's sinc^3 droop at the tone
// frequency before it sets the reference amplitude.
// Checks per test: Y_AMP against 2/pi of the expected response amplitude
// times the droop (2 % above -30 dBFS, 10 % below), and SNDR within a band; across the
// amplitude sweep SNDR must rise with the stimulus level, and across the
// frequency sweep it must fall as the tone frequency rises.
module tb_cswf_workloads;
  import cswf_pkg::*;
  localparam real PI = 3.141592653589793;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] a_s, a_r, a21;
  logic [1:0] step_cmd = 2'd0;
  logic y_sbsg, y_mut, busy, done;
  logic signed [23:0] y_os;
  logic signed [35:0] result;
  int checks = 0, failures = 0;

  cswf_bist_top dut (.*);
  mut_model u_mut (.clk, .rst_n, .x(y_sbsg), .y(y_mut));

  always #5 clk = ~clk;

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_step(input bist_step_e s);
    @(negedge clk); step_cmd = 2'(s); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
  endtask

  // one complete test: amplitude in dBFS, tone k cycles per 2^18 clocks
  task automatic run_test(input real dbfs, input int k, input real sndr_min,
                          input real sndr_max, output real sndr);
    real amp, y_amp_exp, w0, tol, droop;
    longint y_amp, p;
    amp = 10.0 ** (dbfs / 20.0);
    w0  = 2.0 * PI * k / 262144.0;
    a21 = 32'(longint'(2.0 * (1.0 - $cos(w0)) * 4294967296.0));
    a_s = 32'(longint'(amp * 4294967296.0));
    // passband droop of the sinc^3 decimator at the tone frequency
    droop = ($sin(w0 * 64.0) / (128.0 * $sin(w0 / 2.0))) ** 3;
    a_r = '0;
    run_step(STEP_OFFSET);
    run_step(STEP_AMPLITUDE);
    y_amp = result;
    y_amp_exp = 2.0 / PI * 0.5 * amp * 2097152.0 * droop;
    tol = (dbfs > -30.0) ? 0.02 : 0.10;
    // host: reference amplitude = response amplitude before the decimator
    a_r = 32'(longint'(real'(y_amp) / droop * PI / 2.0 * 2048.0));
    run_step(STEP_THDN);
    p = (result > 0) ? result : 1;
    sndr = 10.0 * $log10((real'(y_amp) * PI / 2.0) ** 2 / 2.0 / real'(p));
    $display("%6.1f dBFS  k=%0d  a21=%0d  Y_OS=%0d  Y_AMP=%0d (exp %0.0f)  P_THDN=%0d  SNDR=%0.1f dB",
             dbfs, k, a21, y_os, y_amp, y_amp_exp, p, sndr);
    check($sformatf("Y_AMP at %0.1f dBFS, k=%0d", dbfs, k),
          real'(y_amp) > (1.0 - tol) * y_amp_exp && real'(y_amp) < (1.0 + tol) * y_amp_exp);
    check($sformatf("SNDR at %0.1f dBFS, k=%0d", dbfs, k), sndr > sndr_min && sndr < sndr_max);
  endtask

  real s60, s40, s20, s6, s4, sf4, sf8, sf10;

  initial begin
    a_s = '0; a_r = '0; a21 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // dynamic range at ~1 kHz (43 cycles in 2^18 clocks)
    run_test(-60.0, 43, 15.0, 40.0, s60);
    run_test(-40.0, 43, 35.0, 60.0, s40);
    run_test(-20.0, 43, 55.0, 80.0, s20);
    run_test(-6.0,  43, 68.0, 95.0, s6);
    run_test(-4.0,  43, 68.0, 95.0, s4);
    check("SNDR rises with amplitude", s60 < s40 && s40 < s20 && s20 < s6);
    // frequency sweep at -6 dBFS: ~4 kHz and ~8 kHz
    run_test(-6.0, 171, 50.0, 90.0, sf4);
    run_test(-6.0, 341, 35.0, 90.0, sf8);
    run_test(-6.0, 427, 25.0, 90.0, sf10);
    check("SNDR falls with tone frequency", s6 > sf4 && sf4 > sf8 && sf8 > sf10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
