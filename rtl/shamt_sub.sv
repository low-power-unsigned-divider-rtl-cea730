// shamt_sub - shift-amount subtractor of the approximate divider.
//
// Computes sh = la - lb - K as a two's complement number of
// ceil(log2(2N))+1 bits. A positive sh means the reduced-width quotient is
// shifted left by sh bits, a negative one right by -sh bits, which realises
// the factor 2^(l_A - l_B - k) of the approximation
//   A/B ~ floor(A_p/B_p) * 2^(l_A - l_B - k).
// It works in parallel with the reduced-width divider. Purely
// combinational. The width follows the method; folding the constant K into
// the subtraction is this design's choice.
module shamt_sub #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 3,
  localparam int unsigned LAW = $clog2(2 * N),
  localparam int unsigned LBW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW  = LAW + 1
) (
  input  logic [LAW-1:0]       la,
  input  logic [LBW-1:0]       lb,
  output logic signed [SW-1:0] sh
);
  always_comb
    sh = signed'({1'b0, la}) - signed'(SW'(lb)) - signed'(SW'(K));
endmodule
