// aaxd_signed - signed approximate divider built around the unsigned AAXD.
//
// Used where signed quotients are needed (e.g. normalising vectors in a
// Gram-Schmidt QR decomposition). The magnitudes of the two's complement
// operands are divided by the unsigned approximate divider and the sign of
// the quotient is the XOR of the operand signs. The result is returned in
// two's complement with one extra bit, so that every N-bit magnitude can be
// negated. Purely combinational.
// The magnitude/XOR scheme follows the document; the two's complement
// encoding of inputs and output is this design's choice. The caller keeps
// |a| >> N below |b| and b non-zero, as for the unsigned divider.
// Defaults: 32/16 division with a 20-bit pruned dividend (K = 10).
module aaxd_signed #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 10
) (
  input  logic [2*N-1:0] a,
  input  logic [N-1:0]   b,
  output logic [N:0]     q
);
  logic [2*N-1:0] a_mag;
  logic [N-1:0]   b_mag;
  logic [N-1:0]   q_mag;
  logic           neg;

  always_comb begin
    a_mag = a[2*N-1] ? -a : a;
    b_mag = b[N-1]   ? -b : b;
    neg   = a[2*N-1] ^ b[N-1];
  end

  aaxd #(.N(N), .K(K)) u_div (.a(a_mag), .b(b_mag), .q(q_mag));

  assign q = neg ? -{1'b0, q_mag} : {1'b0, q_mag};
endmodule
