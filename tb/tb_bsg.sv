// Self-checking testbench of the bit-stream generator.
// 1. Bit-exact: the output is compared with a reference model of the
//    resonator and quantiser equations kept here in 64-bit integers.
// 2. Spectral: over whole periods of the expected tone (cos w0 =
//    1 - a21/2^33) the bit-stream's correlation with cos/sin gives an
//    amplitude that must match `amp` within 3 %, and its mean must be ~0.
// 3. Restart: after a second `init` the stream repeats bit for bit.
// Tone: a21 = 4562, about 43/2^18 of the clock, amplitudes 0.5 and 0.25 FS.
module tb_bsg;
  localparam longint FS = longint'(1) << 32;

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0;
  logic [31:0] amp, a21;
  logic bit_out;
  int checks = 0, failures = 0;

  bsg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  longint v1, v2, e1, e2, w, ev;
  int mism;
  logic bref;

  task automatic ref_init();
    v1 = 0; v2 = longint'(amp); e1 = 0; e2 = 0;
  endtask

  // one reference step; returns the bit produced this cycle
  function automatic logic ref_step();
    logic b;
    w  = v2 + 2 * e1 - e2;
    b  = (w >= 0);
    ev = w - (b ? FS : -FS);
    v1 = b ? v1 - longint'(a21) : v1 + longint'(a21);
    v2 = v2 + v1;
    e2 = e1; e1 = ev;
    return b;
  endfunction

  real w0, c, s, m, est, ampf;
  int nsamp;
  logic first_bits [2000];

  task automatic run_tone(input logic [31:0] amp_in);
    amp = amp_in;
    @(negedge clk); init = 1'b1;
    @(negedge clk); init = 1'b0;
    ref_init();
    w0 = $acos(1.0 - real'(a21) / 8589934592.0);
    nsamp = int'($floor(4.0 * 2.0 * 3.141592653589793 / w0));  // 4 periods
    c = 0.0; s = 0.0; m = 0.0; mism = 0;
    for (int n = 0; n < nsamp; n++) begin
      bref = ref_step();
      @(posedge clk); #1;
      if (bit_out !== bref) mism++;
      if (n < 2000) first_bits[n] = bit_out;
      c += (bit_out ? 1.0 : -1.0) * $cos(w0 * n);
      s += (bit_out ? 1.0 : -1.0) * $sin(w0 * n);
      m += (bit_out ? 1.0 : -1.0);
    end
    est  = 2.0 * $sqrt(c * c + s * s) / nsamp;
    ampf = real'(amp) / real'(FS);
    checks++;
    if (mism != 0) begin
      failures++;
      $display("FAIL amp %f: %0d bits differ from the reference model", ampf, mism);
    end
    checks++;
    if (est < 0.97 * ampf || est > 1.03 * ampf) begin
      failures++;
      $display("FAIL tone amplitude %f, expected %f", est, ampf);
    end
    checks++;
    if (m / nsamp > 0.01 || m / nsamp < -0.01) begin
      failures++;
      $display("FAIL mean %f", m / nsamp);
    end
    $display("amp %f: measured %f over %0d samples", ampf, est, nsamp);
  endtask

  initial begin
    amp = '0; a21 = 32'd4562;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_tone(32'h8000_0000);
    run_tone(32'h4000_0000);
    // restart: the first 2000 bits must repeat
    @(negedge clk); init = 1'b1;
    @(negedge clk); init = 1'b0;
    mism = 0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk); #1;
      if (bit_out !== first_bits[n]) mism++;
    end
    checks++;
    if (mism != 0) begin
      failures++;
      $display("FAIL restart: %0d bits differ", mism);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
