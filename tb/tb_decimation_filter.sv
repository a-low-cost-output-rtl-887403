// Self-checking testbench of the sinc^3 decimation filter at R = 128.
// The expected output is the direct convolution of the input history with
// the filter's impulse response (three length-R boxcars convolved, built
// here at start-up). Also checks the output rate (one sample per R inputs)
// and that a constant +1 input settles to R^3 = 2^21.
module tb_decimation_filter;
  localparam int R = 128;
  localparam int L = 3 * R - 2;
  localparam int NIN = 40 * R;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] d = '0;
  logic signed [23:0] y;
  logic y_valid;
  int checks = 0, failures = 0;

  decimation_filter #(.R(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NIN * 2) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint h [L];
  longint h2 [2*R-1];
  int x [NIN];
  int ninputs = 0, nout = 0, last_valid_at = -1;
  longint expv;

  initial begin
    // impulse response: boxcar * boxcar * boxcar
    foreach (h2[i]) h2[i] = 0;
    foreach (h[i]) h[i] = 0;
    for (int i = 0; i < R; i++) for (int j = 0; j < R; j++) h2[i+j] += 1;
    for (int i = 0; i < 2*R-1; i++) for (int j = 0; j < R; j++) h[i+j] += h2[i];

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (ninputs < NIN) begin
      if (y_valid) begin
        expv = 0;
        for (int j = 0; j < L; j++)
          if (ninputs - 1 - j >= 0) expv += h[j] * x[ninputs - 1 - j];
        checks++;
        if (longint'(y) != expv) begin
          failures++;
          $display("FAIL output %0d: y=%0d expected %0d", nout, y, expv);
        end
        if (ninputs % R != 0) begin
          failures++;
          $display("FAIL output %0d after %0d inputs", nout, ninputs);
        end
        if (last_valid_at >= 0) begin
          checks++;
          if (ninputs - last_valid_at != R) begin
            failures++;
            $display("FAIL output spacing %0d", ninputs - last_valid_at);
          end
        end
        last_valid_at = ninputs;
        nout++;
      end
      // first half random -1/0/+1, second half constant +1
      if (ninputs < NIN / 2) x[ninputs] = int'($urandom % 3) - 1;
      else                   x[ninputs] = 1;
      d = 2'(x[ninputs]);
      ninputs++;
      @(negedge clk);
    end
    checks++;
    if (y != 24'sd2097152) begin
      failures++;
      $display("FAIL DC gain: y=%0d expected %0d", y, 2097152);
    end
    checks++;
    if (nout != NIN / R - 1) begin
      failures++;
      $display("FAIL number of outputs %0d", nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
