// End-to-end testbench of the CSWF BIST system at its default size
// (N = 2^11 decimated samples per step, OSR 128), with a behavioural
// modulator under test (gain 0.5, offset 200/2^20 FS, small noise).
// It runs a -6 dBFS stimulus near 43/2^18 of the clock through the three
// steps: offset, amplitude (then sets the reference amplitude from Y_AMP as
// the host would), and THD+N power, and checks
//   - each result against an independent sum of the decimated words seen at
//     the analyzer input during the step,
//   - Y_OS against the model offset, Y_AMP against 2/pi of the expected tone
//     amplitude, and that the THD+N power yields an SNDR of 65..95 dB,
//   - the step length of (SETTLE + N) * OSR cycles,
//   - that the step-3 residue has no mean left (offset and tone removed),
//   - that every mechanism occurred: the three steps, discarded settling
//     samples, both MUX1 paths, zero and non-zero partial products, and
//     zero and non-zero residue bits.
module tb_cswf_bist_top;
  import cswf_pkg::*;
  localparam int LOG2N = 11, N = 1 << LOG2N, OSR = 128, SETTLE = 4;
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
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_step [4];
  int n_settle_discard, n_neg, n_pos, n_pp_zero, n_pp_add, n_res_zero, n_res_nz;
  longint ref_sum, res_sum = 0;
  logic signed [23:0] yr;

  always @(posedge clk) begin
    if (dut.u_ora.take) begin
      n_step[dut.step]++;
      yr = dut.y_dec - dut.y_os;
      unique case (dut.step)
        STEP_OFFSET:    ref_sum += longint'(dut.y_dec);
        STEP_AMPLITUDE: ref_sum += (yr < 0) ? -longint'(yr) : longint'(yr);
        STEP_THDN: begin
          ref_sum += longint'(yr) * longint'(yr);
          res_sum += longint'(yr);
        end
        default: ;
      endcase
      if (dut.step != STEP_OFFSET) begin
        if (yr < 0) n_neg++; else n_pos++;
      end
    end
    if (dut.dec_valid && !dut.run && dut.step != STEP_IDLE && !dut.done) n_settle_discard++;
    if (dut.busy) begin
      if (dut.u_ora.rsr[0]) n_pp_add++; else n_pp_zero++;
    end
    if (dut.step == STEP_THDN) begin
      if (dut.dec_in == 2'b00) n_res_zero++; else n_res_nz++;
    end
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int t0, len;
  task automatic run_step(input bist_step_e s);
    ref_sum = 0;
    @(negedge clk); step_cmd = 2'(s); start = 1'b1; t0 = $time / 10;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    len = $time / 10 - t0;
    $display("step %0d: %0d cycles, result %0d", s, len, result);
    check("step length", len >= (SETTLE + N - 1) * OSR && len <= (SETTLE + N + 1) * OSR + 40);
    check("result = independent sum / N", longint'(result) == (ref_sum >>> LOG2N));
  endtask

  real a_resp, y_amp_exp, sndr, ps, w0, droop;
  longint y_amp, p_thdn;

  initial begin
    a21 = 32'd4562;          // cos(w0) = 1 - a21/2^33: ~43/2^18 of the clock
    a_s = 32'h8000_0000;     // -6 dBFS stimulus
    a_r = 32'd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    run_step(STEP_OFFSET);
    // model offset 200/2^20 FS, decimator gain 2^21 -> 400
    check("Y_OS near model offset", y_os > 300 && y_os < 500);
    check("Y_OS held = result", longint'(y_os) == longint'(result));

    run_step(STEP_AMPLITUDE);
    y_amp = result;
    a_resp = 0.5 * 0.5 * 2097152.0;            // model gain x stimulus x 2^21
    y_amp_exp = 2.0 / PI * a_resp;
    $display("Y_AMP %0d, expected about %f", y_amp, y_amp_exp);
    check("Y_AMP within 2 %", y_amp > 0.98 * y_amp_exp && y_amp < 1.02 * y_amp_exp);

    // host: reference amplitude = response amplitude before the decimator,
    // i.e. Y_AMP * pi/2 / 2^21 of full scale, corrected for the sinc^3 droop
    w0 = $acos(1.0 - real'(a21) / 8589934592.0);
    droop = ($sin(w0 * 64.0) / (128.0 * $sin(w0 / 2.0))) ** 3;
    a_r = 32'(longint'(real'(y_amp) / droop * PI / 2.0 * 2048.0));

    run_step(STEP_THDN);
    p_thdn = result;
    ps = (real'(y_amp) * PI / 2.0) ** 2 / 2.0;
    sndr = 10.0 * $log10(ps / (p_thdn > 0 ? real'(p_thdn) : 1.0));
    $display("P_THDN %0d, SNDR %f dB", p_thdn, sndr);
    check("P_THDN > 0", p_thdn > 0);
    // offset and tone removed: the step-3 residue has (almost) no mean
    $display("step-3 residue mean %0d", res_sum >>> LOG2N);
    check("residue mean ~0", (res_sum >>> LOG2N) > -60 && (res_sum >>> LOG2N) < 60);
    check("SNDR 65..95 dB", sndr > 65.0 && sndr < 95.0);

    $display("mechanisms: steps %0d/%0d/%0d settle-discards %0d neg %0d pos %0d pp_add %0d pp_zero %0d res0 %0d res!=0 %0d",
             n_step[1], n_step[2], n_step[3], n_settle_discard, n_neg, n_pos,
             n_pp_add, n_pp_zero, n_res_zero, n_res_nz);
    check("step 1 took N samples", n_step[1] == N);
    check("step 2 took N samples", n_step[2] == N);
    check("step 3 took N samples", n_step[3] == N);
    check("settling samples discarded", n_settle_discard == 3 * SETTLE);
    check("MUX1 negate path used", n_neg > 0);
    check("MUX1 pass path used", n_pos > 0);
    check("non-zero partial products", n_pp_add > 0);
    check("zero partial products", n_pp_zero > 0);
    check("residue zero", n_res_zero > 0);
    check("residue non-zero", n_res_nz > 0);
    check("multiplier cycles = 24 N", n_pp_add + n_pp_zero == 24 * N);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
