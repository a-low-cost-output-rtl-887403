// Self-checking testbench of the phase compensator: random bits in, the
// output must equal the input of two clock cycles earlier.
module tb_phase_compensator;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, q;
  int checks = 0, failures = 0;
  logic [2:0] hist = '0;   // hist[k]: input applied k+1 cycles ago

  phase_compensator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      // after the posedge just passed, q shows the input of two edges ago
      checks++;
      if (q !== hist[1]) begin
        failures++;
        $display("FAIL cycle %0d: q=%b expected %b", n, q, hist[1]);
      end
      d = 1'($urandom);
      hist = {hist[1:0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
