// Phase compensator: a pure delay of DELAY clock cycles on a 1-bit stream.
// The reference bit-stream passes through it so that it lines up with the
// modulator output, whose signal transfer function is close to a pure
// two-sample delay; hence the default DELAY = 2 (transfer function z^-2).
// Interface: d in, q out, one bit per clock; q(n) = d(n - DELAY).
// The registers reset to 0, which is this design's choice.
module phase_compensator #(
  parameter int unsigned DELAY = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [DELAY-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else sr <= DELAY'({sr, d});
  end

  assign q = sr[DELAY-1];

endmodule
