// Decimation filter: third-order CIC (sinc^3) decimator by R.
// Three integrators run at the input rate on the sign-extended 2-bit input;
// every R-th cycle their output is taken into three comb stages and the
// result is registered as y with a one-cycle y_valid strobe. The DC gain is
// R^3 (2^21 for R = 128), so a constant +1 input settles to +2^21. Internal
// words are W_OUT bits and wrap: the CIC result is exact as long as the true
// output fits W_OUT bits (2 + 3*log2(R) <= W_OUT).
// The decimation factor and output width follow the system description
// (OSR 128, 24-bit samples); the CIC structure is this design's choice.
// Latency: y_valid rises one cycle after the R-th input sample of a frame.
module decimation_filter #(
  parameter int unsigned R     = 128,
  parameter int unsigned W_OUT = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic        [1:0]       d,
  output logic signed [W_OUT-1:0] y,
  output logic                    y_valid
);

  localparam int unsigned CW = (R > 1) ? $clog2(R) : 1;

  logic signed [W_OUT-1:0] i1, i2, i3;
  logic signed [W_OUT-1:0] c1_d, c2_d, c3_d;   // comb delay registers
  logic signed [W_OUT-1:0] c1, c2, c3;
  logic [CW-1:0]           phase;
  logic signed [W_OUT-1:0] din;

  assign din = W_OUT'(signed'(d));

  // integrators (input rate)
  logic signed [W_OUT-1:0] i1n, i2n, i3n;
  assign i1n = i1 + din;
  assign i2n = i2 + i1n;
  assign i3n = i3 + i2n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1 <= '0; i2 <= '0; i3 <= '0;
    end else begin
      i1 <= i1n;
      i2 <= i2n;
      i3 <= i3n;
    end
  end

  // combs (output rate), fed with the integrator chain after this cycle's input
  assign c1  = i3n - c1_d;
  assign c2  = c1 - c2_d;
  assign c3  = c2 - c3_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      c1_d <= '0; c2_d <= '0; c3_d <= '0;
      y <= '0; y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (phase == CW'(R - 1)) begin
        phase   <= '0;
        c1_d    <= i3n;
        c2_d    <= c1;
        c3_d    <= c2;
        y       <= c3;
        y_valid <= 1'b1;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

endmodule
