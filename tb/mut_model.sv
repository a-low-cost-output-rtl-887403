// Behavioural model of the modulator under test (simulation only): a
// second-order sigma-delta modulator in its digital-test configuration,
// which takes a 1-bit stimulus stream instead of an analog input.
// Input x (1 = +FS, 0 = -FS) is scaled by GAIN_NUM/GAIN_DEN, an input offset
// OFFSET and uniform noise of +/-NOISE are added (units of 2^20 = FS), and
// two delaying integrators  i1 += u - y,  i2 += i1 - 2y  with y = sign(i2)
// give STF = z^-2 and NTF = (1 - z^-1)^2. The output is the sign of the
// present state, so y(n) follows x(n-2).
module mut_model #(
  parameter int GAIN_NUM = 1,
  parameter int GAIN_DEN = 2,
  parameter int OFFSET   = 200,
  parameter int NOISE    = 300
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic y
);
  localparam longint U = longint'(1) << 20;

  longint i1, i2, u, yv;

  assign y  = (i2 >= 0);
  assign yv = y ? U : -U;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1 <= 0;
      i2 <= 0;
    end else begin
      u  = (x ? U : -U) * GAIN_NUM / GAIN_DEN + OFFSET
           + longint'($urandom % (2 * NOISE + 1)) - NOISE;
      i1 <= i1 + u - yv;
      i2 <= i2 + i1 - 2 * yv;
    end
  end
endmodule
