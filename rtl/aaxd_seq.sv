// aaxd_seq - sequential adaptively approximate 2N/N divider (AAXD_S).
//
// The same approximation as aaxd, with the reduced-width 2(K+1)/(K+1)
// division done by a sequential restoring divider (seq_div_core) instead of
// an array. An operation takes N_CYC = K+3 clock cycles:
//   PREP : leading-one detection, pruning and the shift amount l_A-l_B-K are
//          computed from the registered operands; the core is loaded.
//   ITER : K+1 shifted-subtraction cycles in the core.
//   OUTP : the core quotient is shifted and corrected into q.
// An exact 16/8 sequential divider would need N+2 = 10 cycles; with K = 3
// this one needs 6.
//
// Handshake: 'start' is accepted on a rising edge while busy is low, and a,
// b are sampled on that edge. busy is high from the next cycle until done.
// done is a one-cycle pulse raised N_CYC edges after the accepting edge;
// q then holds the result until the next operation finishes.
// Asynchronous active-low reset. Cycle accounting follows the document
// (one preparation cycle, one cycle per quotient bit, one output cycle);
// the start/busy/done handshake is this design's.
module aaxd_seq #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*N-1:0] a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [N-1:0]   q
);
  import aa_pkg::*;

  localparam int unsigned LAW = $clog2(2 * N);
  localparam int unsigned LBW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned SW  = LAW + 1;

  seq_state_e           state;
  logic [2*N-1:0]       a_r;
  logic [N-1:0]         b_r;
  logic [LAW-1:0]       la;
  logic [LBW-1:0]       lb;
  logic [2*K-1:0]       ap;
  logic [K-1:0]         bp;
  logic signed [SW-1:0] sh;
  logic signed [SW-1:0] sh_r;
  logic                 core_busy, core_last, core_valid;
  logic [K:0]           qd;
  logic [N:0]           qs;
  logic [N-1:0]         qc;

  // Preparation logic, evaluated on the registered operands.
  lopd #(.W(2 * N)) u_lopd_a (.x(a_r), .pos(la));
  lopd #(.W(N))     u_lopd_b (.x(b_r), .pos(lb));
  prune #(.IN_W(2 * N), .OUT_W(2 * K)) u_prune_a (.x(a_r), .lead(la), .xp(ap));
  prune #(.IN_W(N),     .OUT_W(K))     u_prune_b (.x(b_r), .lead(lb), .xp(bp));
  shamt_sub #(.N(N), .K(K)) u_sub (.la(la), .lb(lb), .sh(sh));

  seq_div_core #(.W(K + 1)) u_core (
    .clk  (clk),
    .rst_n(rst_n),
    .load (state == S_PREP),
    .a    ({2'b00, ap}),
    .b    ({1'b0, bp}),
    .busy (core_busy),
    .last (core_last),
    .valid(core_valid),
    .q    (qd)
  );

  // Output logic, evaluated on the core quotient.
  q_shifter #(.N(N), .K(K)) u_shift (.qd(qd), .sh(sh_r), .qs(qs));
  err_corr  #(.N(N))        u_corr  (.qs(qs), .q(qc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_r   <= '0;
      b_r   <= '0;
      sh_r  <= '0;
      q     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_r   <= a;
          b_r   <= b;
          state <= S_PREP;
        end
        S_PREP: begin
          sh_r  <= sh;
          state <= S_ITER;
        end
        S_ITER: if (core_last) state <= S_OUTP;
        S_OUTP: begin
          q     <= qc;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The core result must be ready whenever the output cycle uses it.
  a_core_ready: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_OUTP |-> core_valid && !core_busy);
endmodule
