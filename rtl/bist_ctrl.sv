// BIST step sequencer. One `start` runs the step given on `step_cmd`:
//   INIT   : one-cycle bsg_init re-starts both bit-stream generators in phase
//   SETTLE : SETTLE decimated samples are let pass, so the modulator and the
//            decimation filter forget the previous stimulus
//   CLEAR  : one-cycle ora_clear empties the shared accumulator
//   RUN    : `run` lets the decimated samples into the analyzer until it
//            reports ora_done (N samples)
//   DONE   : `done` stays high until the next start.
// `step` holds the running step (STEP_IDLE outside a step) and drives the
// analyzer's input multiplexer and the residue multiplexer.
// The document defines the three steps and the step select; this controller,
// its states and the settling count are this design's own.
module bist_ctrl
  import cswf_pkg::*;
#(
  parameter int unsigned SETTLE = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  bist_step_e step_cmd,
  input  logic       dec_valid,
  input  logic       ora_done,
  output bist_step_e step,
  output logic       bsg_init,
  output logic       ora_clear,
  output logic       run,
  output logic       done
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_SETTLE, S_CLEAR, S_RUN, S_DONE} state_e;

  localparam int unsigned SW = $clog2(SETTLE + 1);

  state_e        state;
  logic [SW-1:0] settle_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      step       <= STEP_IDLE;
      settle_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE:
          if (start && step_cmd != STEP_IDLE) begin
            state <= S_INIT;
            step  <= step_cmd;
          end
        S_INIT: begin
          settle_cnt <= '0;
          state      <= (SETTLE == 0) ? S_CLEAR : S_SETTLE;
        end
        S_SETTLE:
          if (dec_valid) begin
            settle_cnt <= settle_cnt + 1'b1;
            if (settle_cnt == SW'(SETTLE - 1)) state <= S_CLEAR;
          end
        S_CLEAR: state <= S_RUN;
        S_RUN:   if (ora_done) state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign bsg_init  = (state == S_INIT);
  assign ora_clear = (state == S_CLEAR);
  assign run       = (state == S_RUN);
  assign done      = (state == S_DONE);

endmodule
