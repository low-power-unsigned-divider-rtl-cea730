// array_div - exact unsigned restoring array divider, 2W/W.
//
// W rows of W subtractor cells (sub_cell). Row i appends the next dividend
// bit to the partial remainder, subtracts the divisor in a borrow-ripple
// chain and produces quotient bit q[W-1-i] from an OR gate with one
// inverted input: the bit is 1 when the subtraction does not borrow, or
// when the remainder bit shifted out above the row is 1. That bit then
// drives every cell's restore multiplexer in the row.
// The caller must keep a[2W-1:W] < b (no overflow); the approximate divider
// guarantees it by zero-extending its pruned operands. Purely
// combinational; the critical path runs through all W*W borrow cells.
// The array organisation follows the classic restoring array divider.
module array_div #(
  parameter int unsigned W = 4
) (
  input  logic [2*W-1:0] a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   q,
  output logic [W-1:0]   r
);
  // rem[i] is the W-bit partial remainder entering row i.
  logic [W-1:0] rem [W+1];
  assign rem[0] = a[2*W-1:W];

  for (genvar i = 0; i < W; i++) begin : g_row
    logic [W-1:0] x;       // low W bits of the shifted partial remainder
    logic         xtop;    // bit shifted out above the row
    logic [W:0]   brw;     // borrow chain
    logic         qi;

    assign x      = {rem[i][W-2:0], a[W-1-i]};
    assign xtop   = rem[i][W-1];
    assign brw[0] = 1'b0;
    assign qi     = xtop | ~brw[W];
    assign q[W-1-i] = qi;

    for (genvar j = 0; j < W; j++) begin : g_cell
      sub_cell u_cell (
        .x   (x[j]),
        .y   (b[j]),
        .bin (brw[j]),
        .q   (qi),
        .bout(brw[j+1]),
        .r   (rem[i+1][j])
      );
    end
  end

  assign r = rem[W];
endmodule
