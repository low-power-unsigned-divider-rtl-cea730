// aasr - adaptively approximate square-root circuit (AASR) for a 2N-bit
// radicand.
//
// A leading-one position detector finds l_A, whose LSB is then forced to 1
// so that l_A - 2K + 1 is always even. The radicand is pruned to 2K bits
// starting at that position (truncating LSBs, or appending zeros for small
// radicands), A ~ A_p * 2^(l_A-2K+1), and an exact 2K-bit SQR circuit gives
// floor(sqrt(A_p)). The root is then shifted by (l_A-2K+1)/2 bits, left when
// positive and right when negative:
//   sqrt(A) ~ floor(sqrt(A_p)) * 2^((l_A-2K+1)/2)
// With l_A odd, that shift is just l_A[MSBs:1] - (K-1): no adder is needed
// beyond a constant offset. Radicands below 2^(2K) give the exact root.
// The result never exceeds the exact root, and the error distance is at
// most 2^(N-K) - 1 (31 for the 16-bit circuit with a 6-bit core).
//
// USE_LUT selects the core: 0 = restoring array (AASR_A), 1 = lookup table
// (AASR_T). Purely combinational. Defaults: 16-bit radicand, 6-bit core.
// The pruning, odd leading position and shift follow the method; the USE_LUT
// switch is this design's way of offering both cores.
module aasr #(
  parameter int unsigned N       = 8,
  parameter int unsigned K       = 3,
  parameter bit          USE_LUT = 1'b0
) (
  input  logic [2*N-1:0] a,
  output logic [N-1:0]   q
);
  localparam int unsigned LAW = $clog2(2 * N);

  logic [LAW-1:0] la;
  logic [LAW-1:0] la_odd;
  logic [2*K-1:0] ap;
  logic [K-1:0]   root;
  int             half;   // (l_A - 2K + 1) / 2

  lopd #(.W(2 * N)) u_lopd (.x(a), .pos(la));

  assign la_odd = la | LAW'(1);

  prune #(.IN_W(2 * N), .OUT_W(2 * K)) u_prune (.x(a), .lead(la_odd), .xp(ap));

  if (USE_LUT) begin : g_lut
    lut_sqrt #(.W(K)) u_core (.a(ap), .q(root));
  end else begin : g_array
    logic [K:0] rem_unused;
    array_sqrt #(.W(K)) u_core (.a(ap), .q(root), .r(rem_unused));
  end

  always_comb begin
    half = int'(la_odd[LAW-1:1]) - (int'(K) - 1);
    if (half >= 0)
      q = N'(root) << half;
    else
      q = N'(root) >> (-half);
  end
endmodule
