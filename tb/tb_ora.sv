// Self-checking testbench of the shared-accumulator analyzer (ora).
// Runs the three steps on random decimated samples with N = 16 and compares
// the accumulator, the divided result and Y_OS against sums computed here
// with 64-bit integers. Also checks the 24-cycle serial multiplication, that
// the most negative residue is handled, and that samples beyond N are
// ignored.
module tb_ora;
  import cswf_pkg::*;

  localparam int unsigned LOG2N = 4;
  localparam int unsigned N     = 1 << LOG2N;
  localparam int unsigned GAP   = 40;      // cycles between samples

  logic clk = 1'b0, rst_n = 1'b0;
  bist_step_e step = STEP_IDLE;
  logic clear = 1'b0, y_dec_valid = 1'b0;
  logic signed [23:0] y_dec = '0;
  logic busy, done;
  logic signed [46:0] acc;
  logic signed [23:0] y_os;
  logic signed [46-LOG2N:0] result;

  int checks = 0, failures = 0;
  int busy_cycles;

  ora #(.LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (busy) busy_cycles++;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic send(input logic signed [23:0] v);
    @(negedge clk);
    y_dec = v; y_dec_valid = 1'b1;
    @(negedge clk);
    y_dec_valid = 1'b0;
    repeat (GAP) @(negedge clk);
  endtask

  task automatic start_step(input bist_step_e s);
    @(negedge clk);
    step = s; clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
  endtask

  function automatic longint wrap47(input longint v);
    longint m;
    m = v & ((longint'(1) << 47) - 1);
    if (m[46]) m = m - (longint'(1) << 47);
    return m;
  endfunction

  logic signed [23:0] samples [N];
  longint sum, exp_os, r, sumabs, sumsq;
  logic signed [23:0] res24;
  int k;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- step 1: offset ----------------
    start_step(STEP_OFFSET);
    sum = 0;
    for (k = 0; k < N; k++) begin
      samples[k] = 24'(signed'(($urandom % 2000001)) - 1000000 + 3000);
      sum += samples[k];
      send(samples[k]);
    end
    exp_os = sum >>> LOG2N;
    check("step1 acc", acc, sum);
    check("step1 result", result, exp_os);
    check("step1 y_os", y_os, exp_os);
    check("step1 done", done, 1);
    send(24'sd12345);                      // beyond N: ignored
    check("step1 acc after N", acc, sum);

    // ---------------- step 2: amplitude ----------------
    start_step(STEP_AMPLITUDE);
    check("step2 cleared", acc, 0);
    sumabs = 0;
    for (k = 0; k < N; k++) begin
      if (k == 3) samples[k] = y_os + 24'sh800000;      // residue = -2^23
      else        samples[k] = 24'(signed'(($urandom % 4000001)) - 2000000);
      res24 = samples[k] - y_os;
      r = res24;
      sumabs += (r < 0) ? -r : r;
      send(samples[k]);
    end
    check("step2 acc", acc, sumabs);
    check("step2 result", result, sumabs >>> LOG2N);
    check("step2 y_os kept", y_os, exp_os);

    // ---------------- step 3: THD+N power ----------------
    start_step(STEP_THDN);
    sumsq = 0;
    busy_cycles = 0;
    for (k = 0; k < N; k++) begin
      samples[k] = y_os + 24'(signed'(($urandom % 200001)) - 100000);
      if (k == 5) samples[k] = y_os - 24'sd1;
      res24 = samples[k] - y_os;
      r = res24;
      sumsq += r * r;
      send(samples[k]);
    end
    check("step3 acc", acc, wrap47(sumsq));
    check("step3 result", result, wrap47(sumsq) >>> LOG2N);
    check("step3 multiply cycles", busy_cycles, 24 * N);
    check("step3 done", done, 1);

    // one full-scale residue square
    start_step(STEP_THDN);
    send(y_os + 24'sh800000);
    check("step3 (-2^23)^2", acc, wrap47(longint'(1) << 46));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
