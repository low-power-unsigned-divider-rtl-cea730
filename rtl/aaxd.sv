// aaxd - adaptively approximate unsigned 2N/N divider (AAXD).
//
// Idea: a division only needs the significant bits of its operands. Two
// leading-one position detectors find l_A and l_B; two pruning circuits keep
// 2K bits of the dividend (A_p) and K bits of the divisor (B_p) starting at
// the leading ones. A_p / B_p is computed exactly by a reduced-width
// restoring array divider, widened to 2(K+1)/(K+1) by zero-extending A_p by
// two bits and B_p by one so that it can never overflow (A_p < 2^2K and
// B_p >= 2^(K-1) give a quotient below 2^(K+1)). In parallel a subtractor
// forms sh = l_A - l_B - K and a shifter scales the (K+1)-bit quotient:
//   Q ~ floor(A_p / B_p) * 2^(l_A - l_B - K)
// The (N+1)-bit shifted value is finally clamped to N bits by OR-gate error
// correction. Purely combinational.
//
// Accuracy: for inputs meeting the no-overflow rule (a[2N-1:N] < b) the
// error distance is at most ceil((2^N-1)(2^(N-K)-1)/(2^(N-1)+2^(N-K)-1)),
// i.e. 50 for the 16/8 divider with K = 3. b = 0 is not supported.
// Defaults: the 16/8 divider built on an 8/4 exact array divider (K = 3).
// The datapath follows the method block for block; the sticky top bit of
// the shifter is this design's addition.
module aaxd #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 3
) (
  input  logic [2*N-1:0] a,
  input  logic [N-1:0]   b,
  output logic [N-1:0]   q
);
  localparam int unsigned LAW = $clog2(2 * N);
  localparam int unsigned LBW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned SW  = LAW + 1;

  logic [LAW-1:0]       la;
  logic [LBW-1:0]       lb;
  logic [2*K-1:0]       ap;
  logic [K-1:0]         bp;
  logic [K:0]           qd;
  logic [K:0]           rd_unused;
  logic signed [SW-1:0] sh;
  logic [N:0]           qs;

  lopd #(.W(2 * N)) u_lopd_a (.x(a), .pos(la));
  lopd #(.W(N))     u_lopd_b (.x(b), .pos(lb));

  prune #(.IN_W(2 * N), .OUT_W(2 * K)) u_prune_a (.x(a), .lead(la), .xp(ap));
  prune #(.IN_W(N),     .OUT_W(K))     u_prune_b (.x(b), .lead(lb), .xp(bp));

  array_div #(.W(K + 1)) u_div (
    .a({2'b00, ap}),
    .b({1'b0, bp}),
    .q(qd),
    .r(rd_unused)
  );

  shamt_sub #(.N(N), .K(K)) u_sub (.la(la), .lb(lb), .sh(sh));

  q_shifter #(.N(N), .K(K)) u_shift (.qd(qd), .sh(sh), .qs(qs));

  err_corr #(.N(N)) u_corr (.qs(qs), .q(q));
endmodule
