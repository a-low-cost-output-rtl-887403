// Built-in self-test of a sigma-delta ADC by controlled sine wave fitting
// (CSWF), digital part.
//
// The stimulus bit-stream generator (SBSG) drives the modulator under test
// with a sigma-delta coded sine. The modulator's 1-bit output comes back on
// y_mut, is decimated by OSR and analysed by the ORA in three steps run one
// after another (one per `start`, step number on `step_cmd`):
//   1. offset      Y_OS   = mean of y_DEC
//   2. amplitude   Y_AMP  = mean of |y_DEC - Y_OS|  (= 2A/pi for a sine of A)
//   3. THD+N power P_THDN = mean of |y_RES|^2, where the reference generator
//      (RBSG, amplitude a_r set by the host from Y_AMP, same a21) is delayed
//      by the z^-2 phase compensator and subtracted from y_mut before
//      decimation, and Y_OS after it, so that only distortion and noise stay.
// The host then computes SNDR = (A^2/2) / P_THDN. Both generators are
// re-started at each step, so stimulus and reference share their phase.
//
// Scale: in step 3 the 2-bit filter input carries (y_MUT - y_REF)/2; the
// decimated word is doubled here so that the ORA sees every step at the
// same scale (+/-FS = +/-2^21 at the filter output for OSR 128).
//
// Interface: host words a_s, a_r, a21 (32 bits; amplitudes with 2^32 = FS)
// and start/step_cmd come from a serial I/O port that is not part of this
// RTL; done, y_os and result (accumulator / N) go back to it. y_sbsg and
// y_mut connect to the analog modulator. One step takes
// (SETTLE + N) * OSR cycles plus a few cycles of control.
module cswf_bist_top
  import cswf_pkg::*;
#(
  parameter int unsigned LOG2N  = 11,
  parameter int unsigned OSR    = 128,
  parameter int unsigned SETTLE = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [31:0]                   a_s,
  input  logic [31:0]                   a_r,
  input  logic [31:0]                   a21,
  input  logic                          start,
  input  logic [1:0]                    step_cmd,
  output logic                          y_sbsg,
  input  logic                          y_mut,
  output logic                          busy,
  output logic                          done,
  output logic signed [DEC_W-1:0]       y_os,
  output logic signed [ACC_W-LOG2N-1:0] result
);

  bist_step_e              step;
  logic                    bsg_init, ora_clear, run, ora_done;
  logic                    y_rbsg, y_ref;
  logic [1:0]              dec_in;
  logic signed [DEC_W-1:0] dec_out, y_dec;
  logic                    dec_valid;

  bist_ctrl #(.SETTLE(SETTLE)) u_ctrl (
    .clk, .rst_n, .start,
    .step_cmd (bist_step_e'(step_cmd)),
    .dec_valid, .ora_done, .step, .bsg_init, .ora_clear, .run, .done
  );

  bsg u_sbsg (.clk, .rst_n, .init(bsg_init), .amp(a_s), .a21, .bit_out(y_sbsg));
  bsg u_rbsg (.clk, .rst_n, .init(bsg_init), .amp(a_r), .a21, .bit_out(y_rbsg));

  phase_compensator #(.DELAY(2)) u_phase (.clk, .rst_n, .d(y_rbsg), .q(y_ref));

  residue_mux u_mux (.y_mut, .y_ref, .sel_res(step == STEP_THDN), .d(dec_in));

  decimation_filter #(.R(OSR), .W_OUT(DEC_W)) u_dec (
    .clk, .rst_n, .d(dec_in), .y(dec_out), .y_valid(dec_valid)
  );

  assign y_dec = (step == STEP_THDN) ? (dec_out <<< 1) : dec_out;

  ora #(.W_IN(DEC_W), .W_ACC(ACC_W), .LOG2N(LOG2N)) u_ora (
    .clk, .rst_n, .step, .clear(ora_clear), .y_dec,
    .y_dec_valid(dec_valid && run), .busy, .done(ora_done), .acc(), .y_os, .result
  );

endmodule
