// lopd - leading one position detector.
//
// Returns the bit index of the most significant '1' of x, written as a
// priority encoder (a scan from the LSB upwards, where a later, higher hit
// overrides an earlier one). An all-zero input reports position 0, the same
// as the value 1; the approximate divider relies on this, because the
// pruned operand then keeps bit 0 and the result stays exact.
// Purely combinational. W is the operand width. The priority-encoder
// structure and the zero rule follow the method; the loop form is this
// design's.
module lopd #(
  parameter int unsigned W  = 16,
  localparam int unsigned PW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  x,
  output logic [PW-1:0] pos
);
  always_comb begin
    pos = '0;
    for (int unsigned i = 0; i < W; i++)
      if (x[i]) pos = PW'(i);
  end
endmodule
