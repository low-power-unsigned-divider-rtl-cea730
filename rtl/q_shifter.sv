// q_shifter - bidirectional shifter of the approximate divider.
//
// Shifts the (K+1)-bit reduced-width quotient qd left by sh bits (sh > 0)
// or right by -sh bits (sh < 0), producing the (N+1)-bit intermediate
// result Q_s. Bits that would land above position N are ORed into qs[N],
// so every value of 2^N or more is flagged for the error correction stage;
// this sticky top bit is this design's choice and only matters for inputs
// that break the no-overflow rule. Right shifts truncate (floor).
// Purely combinational.
module q_shifter #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 3,
  localparam int unsigned SW = $clog2(2 * N) + 1
) (
  input  logic [K:0]           qd,
  input  logic signed [SW-1:0] sh,
  output logic [N:0]           qs
);
  // Wide enough for the largest left shift sh can express.
  localparam int unsigned XW = K + 1 + 2 ** (SW - 1) - 1;

  logic [XW-1:0] wide;

  always_comb begin
    if (sh >= 0)
      wide = XW'(qd) << unsigned'(sh);
    else
      wide = XW'(qd) >> unsigned'(-sh);
    qs = {|wide[XW-1:N], wide[N-1:0]};
  end
endmodule
