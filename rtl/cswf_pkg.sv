// Shared types and constants of the controlled-sine-wave-fitting (CSWF) BIST
// system. The BIST step code doubles as the select of the analyzer's input
// multiplexer: inputs 1, 2 and 3 feed the offset, amplitude and THD+N power
// computations, in that order. Code 0 is this design's idle value.
package cswf_pkg;

  typedef enum logic [1:0] {
    STEP_IDLE      = 2'd0,
    STEP_OFFSET    = 2'd1,  // step 1: Y_OS   = (1/N) sum y_DEC
    STEP_AMPLITUDE = 2'd2,  // step 2: Y_AMP  = (1/N) sum |y_DEC - Y_OS|
    STEP_THDN      = 2'd3   // step 3: P_THDN = (1/N) sum |y_RES|^2
  } bist_step_e;

  // Word widths of the analyzer datapath.
  localparam int unsigned DEC_W = 24;  // decimated sample
  localparam int unsigned ACC_W = 47;  // shared accumulator

endpackage
