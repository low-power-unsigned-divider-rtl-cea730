// sub_cell - restoring subtractor cell, the unit cell of the array divider
// and the array square-root circuit.
//
// A full subtractor computes x - y - bin giving a difference bit and a
// borrow out. The row's quotient (or root) bit q then selects the output:
// q = 1 passes the difference on to the next row, q = 0 restores the
// minuend bit x. Purely combinational; one cell per bit per row.
// The cell structure (full subtractor followed by a restore multiplexer) is
// the classic restoring array cell; the gate-level form is this design's.
module sub_cell (
  input  logic x,     // minuend bit (partial remainder)
  input  logic y,     // subtrahend bit (divisor or trial root)
  input  logic bin,   // borrow in from the less significant cell
  input  logic q,     // 1: keep the difference, 0: restore x
  output logic bout,  // borrow out to the more significant cell
  output logic r      // remainder bit for the next row
);
  logic d;

  always_comb begin
    d    = x ^ y ^ bin;
    bout = (~x & y) | (~x & bin) | (y & bin);
    r    = q ? d : x;
  end
endmodule
