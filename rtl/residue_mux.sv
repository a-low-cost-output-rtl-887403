// Residue subtractor and input multiplexer of the decimation filter.
// In steps 1 and 2 the modulator output passes alone; in step 3 the
// compensated reference bit-stream is subtracted from it so that only the
// offset, the gain/phase mismatch and the THD+N reach the filter.
// Bits code +1 (1) and -1 (0). The output is a 2-bit two's complement word:
//   sel_res = 0 : d = y_mut ? +1 : -1
//   sel_res = 1 : d = (y_mut - y_ref)/2, one of -1, 0, +1
// The halving keeps the difference in two bits; the factor 2 is restored on
// the decimated word by the system top. Purely combinational.
module residue_mux (
  input  logic       y_mut,
  input  logic       y_ref,
  input  logic       sel_res,
  output logic [1:0] d
);

  always_comb begin
    if (!sel_res)             d = y_mut ? 2'b01 : 2'b11;
    else if (y_mut == y_ref)  d = 2'b00;
    else                      d = y_mut ? 2'b01 : 2'b11;
  end

endmodule
