// Self-checking testbench of the residue multiplexer: all eight input
// combinations against the value worked out from +1/-1 bit coding.
module tb_residue_mux;
  logic y_mut, y_ref, sel_res;
  logic [1:0] d;
  int checks = 0, failures = 0;
  int vm, vr, expv;

  residue_mux dut (.*);

  initial begin
    for (int k = 0; k < 8; k++) begin
      {sel_res, y_mut, y_ref} = 3'(k);
      #1;
      vm = y_mut ? 1 : -1;
      vr = y_ref ? 1 : -1;
      expv = sel_res ? (vm - vr) / 2 : vm;
      checks++;
      if (int'(signed'(d)) != expv) begin
        failures++;
        $display("FAIL sel=%b mut=%b ref=%b: d=%0d expected %0d",
                 sel_res, y_mut, y_ref, signed'(d), expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
