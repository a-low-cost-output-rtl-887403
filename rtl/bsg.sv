// Bit-stream generator (BSG): a digital resonator with a 1-bit sigma-delta
// modulator inside its loop. It produces a sigma-delta bit-stream whose
// in-band content is a sine of amplitude `amp` (fraction of full scale,
// 2^32 = FS) and of a frequency set by `a21`. The same module serves as the
// stimulus generator (SBSG) and the reference generator (RBSG).
//
// How it works: two integrators form a lossless-discrete-integrator
// resonator,  v1 <- v1 - a21*b,  v2 <- v2 + v1(new),  where b = +/-1 is the
// 1-bit quantisation of v2. Because the resonator is fed back with the
// quantised bit, the only "multiplication" is an add or subtract of a21, so
// no parallel multiplier is needed. The quantiser is a second-order
// error-feedback modulator, w = v2 + 2e1 - e2, b = sign(w), e = w - b*FS,
// with no delay inside the resonator loop, which keeps the poles on the unit
// circle: the tone frequency w0 obeys cos(w0) = 1 - a21/2^33.
// The amplitude is the initial condition: `init` loads v2 = amp, v1 = 0 and
// clears the quantiser, which also fixes the phase, so two BSGs started by the
// same `init` are in phase.
//
// Interface: bit_out is registered, one bit per clock, 1 = +FS, 0 = -FS.
// The document gives this block's function and its 32-bit amp/a21 words; the
// resonator and quantiser structure and W_STATE are this design's choices.
module bsg #(
  parameter int unsigned W_CFG   = 32,
  parameter int unsigned W_STATE = 40
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic [W_CFG-1:0] amp,
  input  logic [W_CFG-1:0] a21,
  output logic             bit_out
);

  typedef logic signed [W_STATE-1:0] state_t;

  localparam state_t FS = state_t'(1) <<< W_CFG;

  state_t v1, v2, e1, e2;
  state_t w, fb, e_new, v1_new, v2_new, a21_s;
  logic   b;

  always_comb begin
    a21_s  = state_t'({1'b0, a21});
    w      = v2 + (e1 <<< 1) - e2;
    b      = ~w[W_STATE-1];            // sign(w), 0 counts as positive
    fb     = b ? FS : -FS;
    e_new  = w - fb;
    v1_new = b ? v1 - a21_s : v1 + a21_s;
    v2_new = v2 + v1_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= '0; v2 <= '0; e1 <= '0; e2 <= '0;
      bit_out <= 1'b0;
    end else if (init) begin
      v1 <= '0;
      v2 <= state_t'({1'b0, amp});
      e1 <= '0; e2 <= '0;
      bit_out <= 1'b0;
    end else begin
      v1 <= v1_new;
      v2 <= v2_new;
      e2 <= e1;
      e1 <= e_new;
      bit_out <= b;
    end
  end

endmodule
