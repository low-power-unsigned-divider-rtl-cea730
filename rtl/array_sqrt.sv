// array_sqrt - exact restoring array square-root circuit.
//
// Radicand a has 2W bits, root q has W bits. Row i (i = 0..W-1) brings down
// the next pair of radicand bits behind the partial remainder R_i and tries
// to subtract the trial value (Q_i, 0, 1), i.e. 4*Q_i + 1, where Q_i is the
// root found so far. As for the divider, the root bit is the OR of the
// remainder bit above the row with the inverted final borrow, and it
// drives the restore multiplexers of the row's subtractor cells.
// Because R_i <= 2*Q_i, row i needs only i+2 cells, so the array has
// W*(W+3)/2 cells. Purely combinational. r is the final remainder a - q^2.
// The restoring array follows the classic design; the trimmed row widths
// are this design's (full-width rows would use W*W+W cells).
module array_sqrt #(
  parameter int unsigned W = 3
) (
  input  logic [2*W-1:0] a,
  output logic [W-1:0]   q,
  output logic [W:0]     r
);
  // rem[i] holds R_i in its low i+1 bits.
  logic [W:0] rem [W+1];
  assign rem[0] = '0;

  for (genvar i = 0; i < W; i++) begin : g_row
    localparam int unsigned CW = i + 2;   // cells in this row
    logic [CW-1:0] x;      // low bits of the shifted remainder
    logic          xtop;   // remainder bit above the row
    logic [CW-1:0] y;      // trial subtrahend {Q_i, 0, 1}
    logic [CW:0]   brw;
    logic [CW-1:0] rn;
    logic          qi;

    if (i == 0) begin : g_first
      assign x    = a[2*W-1:2*W-2];
      assign xtop = 1'b0;
      assign y    = 2'b01;
    end else begin : g_next
      assign x    = {rem[i][i-1:0], a[2*(W-i)-1:2*(W-i)-2]};
      assign xtop = rem[i][i];
      assign y    = {q[W-1:W-i], 2'b01};
    end

    assign brw[0] = 1'b0;
    assign qi     = xtop | ~brw[CW];
    assign q[W-1-i] = qi;

    for (genvar j = 0; j < CW; j++) begin : g_cell
      sub_cell u_cell (
        .x   (x[j]),
        .y   (y[j]),
        .bin (brw[j]),
        .q   (qi),
        .bout(brw[j+1]),
        .r   (rn[j])
      );
    end

    assign rem[i+1] = (W+1)'(rn);
  end

  assign r = rem[W];
endmodule
