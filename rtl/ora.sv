// Output response analyzer (ORA) with one shared accumulator.
//
// The three BIST steps of the CSWF method each reduce N decimated samples to
// one number, and only one step runs at a time, so a single W_ACC-bit
// accumulator serves all three; the input multiplexer MUX3, selected by the
// BIST step, decides what is added:
//   step 1 (offset):    y_DEC, sign-extended            -> sum = N * Y_OS
//   step 2 (amplitude): |y_RES| = |y_DEC - Y_OS|        -> sum = N * Y_AMP
//   step 3 (THD+N):     partial products of |y_RES|^2   -> sum = N * P_THDN
// Dividing by N = 2^LOG2N is a right shift: `result` = acc >>> LOG2N.
//
// |y_RES| is formed as in a two's-complement negator: the inverted word plus
// its sign bit, chosen over y_RES itself by MUX1 when the sign bit is set.
// The square in step 3 comes from a shift-and-add serial multiplier: a W_ACC-
// bit left shift register and a W_IN-bit right shift register are both
// loaded with |y_RES|; on each of the next W_IN cycles MUX2 passes the left
// register (or zero, by the LSB of the right register) to the accumulator,
// then the left register shifts up and the right one down. A sample thus
// takes W_IN = 24 cycles, well inside the 128 cycles between decimated
// samples.
//
// Interface and timing: `clear` (one cycle, at the start of a step) zeroes the
// accumulator and the sample count. Each y_dec_valid strobe offers one sample;
// samples after the N-th are ignored. In steps 1 and 2 a sample is added in
// the cycle after its strobe; in step 3 `busy` is high for the W_IN cycles of
// the multiplication and no new strobe may arrive then. `done` rises once N
// samples have been fully accumulated. At the end of step 1, acc/N is stored
// in the Y_OS register, which steps 2 and 3 subtract.
// The datapath (widths 24/47, MUX1-3, shift registers, shared accumulator)
// follows the document; the Y_OS register, the handshake and the counters
// are this design's own choices. The accumulator wraps modulo 2^W_ACC.
module ora
  import cswf_pkg::*;
#(
  parameter int unsigned W_IN  = DEC_W,
  parameter int unsigned W_ACC = ACC_W,
  parameter int unsigned LOG2N = 11
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  bist_step_e                    step,
  input  logic                          clear,
  input  logic signed [W_IN-1:0]        y_dec,
  input  logic                          y_dec_valid,
  output logic                          busy,
  output logic                          done,
  output logic signed [W_ACC-1:0]       acc,
  output logic signed [W_IN-1:0]        y_os,
  output logic signed [W_ACC-LOG2N-1:0] result
);

  localparam int unsigned CNT_W = LOG2N + 1;
  localparam int unsigned BIT_W = $clog2(W_IN);

  logic signed [W_IN-1:0] y_res;
  logic        [W_IN-1:0] y_res_neg, y_abs;
  logic                   sign_res;
  logic        [W_ACC-1:0] lsr;          // left shift register (multiplicand)
  logic        [W_IN-1:0]  rsr;          // right shift register (multiplier)
  logic        [W_ACC-1:0] partial;      // MUX2 output
  logic signed [W_ACC-1:0] mux3, acc_next;
  logic        [CNT_W-1:0] cnt;
  logic        [BIT_W-1:0] bitcnt;
  logic                    take, add_en, last_sample;

  // offset removal and absolute value (MUX1)
  assign y_res     = y_dec - y_os;
  assign sign_res  = y_res[W_IN-1];
  assign y_res_neg = ~y_res + W_IN'(sign_res);
  assign y_abs     = sign_res ? y_res_neg : y_res;

  // serial multiplier partial product (MUX2)
  assign partial = rsr[0] ? lsr : '0;

  // shared-accumulator input (MUX3)
  always_comb begin
    unique case (step)
      STEP_OFFSET:    mux3 = W_ACC'(y_dec);
      STEP_AMPLITUDE: mux3 = signed'({{(W_ACC-W_IN){1'b0}}, y_abs});
      STEP_THDN:      mux3 = signed'(partial);
      default:        mux3 = '0;
    endcase
  end

  assign take        = y_dec_valid && !busy && (cnt < CNT_W'(1 << LOG2N)) &&
                       (step != STEP_IDLE);
  assign add_en      = (step == STEP_THDN) ? busy : take;
  assign acc_next    = acc + mux3;
  assign last_sample = take && (cnt == CNT_W'((1 << LOG2N) - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      cnt    <= '0;
      busy   <= 1'b0;
      bitcnt <= '0;
      lsr    <= '0;
      rsr    <= '0;
      y_os   <= '0;
    end else if (clear) begin
      acc    <= '0;
      cnt    <= '0;
      busy   <= 1'b0;
      bitcnt <= '0;
    end else begin
      if (add_en) acc <= acc_next;
      if (take) cnt <= cnt + 1'b1;
      // step 1 ends: keep Y_OS = acc / N for the following steps
      if (last_sample && step == STEP_OFFSET)
        y_os <= acc_next[LOG2N +: W_IN];
      if (take && step == STEP_THDN) begin
        lsr    <= {{(W_ACC-W_IN){1'b0}}, y_abs};
        rsr    <= y_abs;
        bitcnt <= '0;
        busy   <= 1'b1;
      end else if (busy) begin
        lsr    <= lsr << 1;
        rsr    <= rsr >> 1;
        bitcnt <= bitcnt + 1'b1;
        if (bitcnt == BIT_W'(W_IN - 1)) busy <= 1'b0;
      end
    end
  end

  assign done   = (cnt == CNT_W'(1 << LOG2N)) && !busy;
  assign result = acc[W_ACC-1:LOG2N];

  // A new sample must not arrive while a square is being accumulated.
  a_no_sample_while_busy :
    assert property (@(posedge clk) disable iff (!rst_n) !(y_dec_valid && busy))
    else $error("ora: sample offered while the serial multiplier is busy");

endmodule
