// aa_top - adaptively approximate divider and square-root circuits, side
// by side.
//
// The circuits are independent; they share only clock and reset:
//   div_*   combinational 2N/N divider (AAXD), reduced core 2(K_DIV+1)/(K_DIV+1)
//   sqa_*   combinational 2N-bit SQR circuit, restoring array core (AASR_A)
//   sqt_*   combinational 2N-bit SQR circuit, lookup-table core (AASR_T)
//   sdiv_*  sequential divider (AAXD_S), K_DIV+3 cycles per division
//   ssqr_*  sequential SQR circuit (AASR_S), K_SQR+2 cycles per root
//   qdiv_*  signed 2Q_N/Q_N divider for QR decomposition (AAXD-20 on 32/16)
//   qsqr_*  2Q_N-bit SQR circuit for the vector norms of the QR
//           decomposition (AASR_T-6 on 32 bits)
// Defaults: the 16/8 divider with an 8/4 exact core and the 16-bit SQR
// circuit with a 6-bit core, plus the 32/16 and 32-bit pair used for image
// reconstruction. Sequential handshakes are described in aaxd_seq/aasr_seq.
module aa_top #(
  parameter int unsigned N         = 8,
  parameter int unsigned K_DIV     = 3,
  parameter int unsigned K_SQR     = 3,
  parameter int unsigned Q_N       = 16,
  parameter int unsigned Q_K_DIV   = 10,
  parameter int unsigned Q_K_SQR   = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  // combinational divider
  input  logic [2*N-1:0]   div_a,
  input  logic [N-1:0]     div_b,
  output logic [N-1:0]     div_q,
  // combinational SQR circuits
  input  logic [2*N-1:0]   sqa_a,
  output logic [N-1:0]     sqa_q,
  input  logic [2*N-1:0]   sqt_a,
  output logic [N-1:0]     sqt_q,
  // sequential divider
  input  logic             sdiv_start,
  input  logic [2*N-1:0]   sdiv_a,
  input  logic [N-1:0]     sdiv_b,
  output logic             sdiv_busy,
  output logic             sdiv_done,
  output logic [N-1:0]     sdiv_q,
  // sequential SQR circuit
  input  logic             ssqr_start,
  input  logic [2*N-1:0]   ssqr_a,
  output logic             ssqr_busy,
  output logic             ssqr_done,
  output logic [N-1:0]     ssqr_q,
  // QR decomposition pair
  input  logic [2*Q_N-1:0] qdiv_a,
  input  logic [Q_N-1:0]   qdiv_b,
  output logic [Q_N:0]     qdiv_q,
  input  logic [2*Q_N-1:0] qsqr_a,
  output logic [Q_N-1:0]   qsqr_q
);
  aaxd #(.N(N), .K(K_DIV)) u_aaxd (.a(div_a), .b(div_b), .q(div_q));

  aasr #(.N(N), .K(K_SQR), .USE_LUT(1'b0)) u_aasr_a (.a(sqa_a), .q(sqa_q));
  aasr #(.N(N), .K(K_SQR), .USE_LUT(1'b1)) u_aasr_t (.a(sqt_a), .q(sqt_q));

  aaxd_seq #(.N(N), .K(K_DIV)) u_aaxd_s (
    .clk  (clk),
    .rst_n(rst_n),
    .start(sdiv_start),
    .a    (sdiv_a),
    .b    (sdiv_b),
    .busy (sdiv_busy),
    .done (sdiv_done),
    .q    (sdiv_q)
  );

  aasr_seq #(.N(N), .K(K_SQR)) u_aasr_s (
    .clk  (clk),
    .rst_n(rst_n),
    .start(ssqr_start),
    .a    (ssqr_a),
    .busy (ssqr_busy),
    .done (ssqr_done),
    .q    (ssqr_q)
  );

  aaxd_signed #(.N(Q_N), .K(Q_K_DIV)) u_qdiv (.a(qdiv_a), .b(qdiv_b), .q(qdiv_q));

  aasr #(.N(Q_N), .K(Q_K_SQR), .USE_LUT(1'b1)) u_qsqr (.a(qsqr_a), .q(qsqr_q));
endmodule
