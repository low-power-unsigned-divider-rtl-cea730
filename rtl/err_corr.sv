// err_corr - error correction of the approximate divider.
//
// N OR gates, q[i] = qs[i] | qs[N]: an intermediate result of 2^N or more
// (qs[N] = 1) is replaced by the largest N-bit quotient 2^N - 1, any other
// result passes unchanged. Purely combinational. Follows the method
// exactly.
module err_corr #(
  parameter int unsigned N = 8
) (
  input  logic [N:0]   qs,
  output logic [N-1:0] q
);
  assign q = qs[N-1:0] | {N{qs[N]}};
endmodule
