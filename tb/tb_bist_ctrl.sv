// Self-checking testbench of the BIST step sequencer. A decimator strobe
// comes every 8 cycles and a stand-in analyzer raises done after 5 strobes
// in the run phase. Checks, for each of the three steps: bsg_init one cycle
// after start, ora_clear exactly after SETTLE strobes, run until done, done
// held, the step code, and that a start with the idle code is ignored.
module tb_bist_ctrl;
  import cswf_pkg::*;
  localparam int SETTLE = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, dec_valid = 1'b0, ora_done;
  bist_step_e step_cmd = STEP_IDLE, step;
  logic bsg_init, ora_clear, run, done;
  int checks = 0, failures = 0;
  int cyc = 0, run_strobes = 0;

  bist_ctrl #(.SETTLE(SETTLE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) dec_valid <= (cyc % 8 == 7);

  // stand-in analyzer: counts strobes while run, cleared by ora_clear
  always @(posedge clk)
    if (ora_clear) run_strobes <= 0;
    else if (run && dec_valid) run_strobes <= run_strobes + 1;
  assign ora_done = (run_strobes >= 5);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  int strobes_before_clear, t0;

  task automatic run_step(input bist_step_e s);
    @(negedge clk); step_cmd = s; start = 1'b1;
    @(negedge clk); start = 1'b0;
    check("bsg_init after start", bsg_init == 1'b1);
    check("step code", step == s);
    @(negedge clk);
    check("bsg_init one cycle", bsg_init == 1'b0);
    strobes_before_clear = 0;
    t0 = cyc;
    while (!ora_clear && cyc - t0 < 1000) begin
      check("no run while settling", !run);
      if (dec_valid) strobes_before_clear++;
      @(negedge clk);
    end
    check("settle strobes", strobes_before_clear == SETTLE);
    @(negedge clk);
    check("run after clear", run == 1'b1);
    while (!done && cyc - t0 < 1000) @(negedge clk);
    check("done reached", done == 1'b1);
    check("five samples taken", run_strobes == 5);
    repeat (20) @(negedge clk);
    check("done held", done == 1'b1 && !run);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); step_cmd = STEP_IDLE; start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (3) @(negedge clk);
    check("idle start ignored", !bsg_init && !run && !done && step == STEP_IDLE);
    run_step(STEP_OFFSET);
    run_step(STEP_AMPLITUDE);
    run_step(STEP_THDN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
