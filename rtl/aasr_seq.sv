// aasr_seq - sequential adaptively approximate square-root circuit (AASR_S)
// for a 2N-bit radicand.
//
// The same approximation as aasr, with the 2K-bit exact square root done by
// a sequential restoring core (seq_sqrt_core). An operation takes
// N_CYC = K+2 clock cycles:
//   PREP : leading-one detection (forced odd), pruning to 2K bits and the
//          root shift (l_A-2K+1)/2; the core is loaded.
//   ITER : K root-bit cycles in the core.
//   OUTP : the K-bit root is shifted into the N-bit result q.
// An exact 16-bit sequential SQR circuit needs N+2 = 10 cycles; with K = 3
// this one needs 5.
//
// Handshake as aaxd_seq: start accepted while busy is low, a sampled on
// that edge, done a one-cycle pulse N_CYC edges later, q held until the
// next result. Asynchronous active-low reset. Cycle accounting follows the
// document; the handshake is this design's.
module aasr_seq #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*N-1:0] a,
  output logic           busy,
  output logic           done,
  output logic [N-1:0]   q
);
  import aa_pkg::*;

  localparam int unsigned LAW = $clog2(2 * N);
  // Root shift range is [-(K-1), N-K]; one sign bit on top.
  localparam int unsigned HW  = $clog2(N + K) + 1;

  seq_state_e          state;
  logic [2*N-1:0]      a_r;
  logic [LAW-1:0]      la;
  logic [LAW-1:0]      la_odd;
  logic [2*K-1:0]      ap;
  logic signed [HW-1:0] half;
  logic signed [HW-1:0] half_r;
  logic                core_busy, core_last, core_valid;
  logic [K-1:0]        root;
  logic [N-1:0]        qn;

  lopd #(.W(2 * N)) u_lopd (.x(a_r), .pos(la));
  assign la_odd = la | LAW'(1);
  prune #(.IN_W(2 * N), .OUT_W(2 * K)) u_prune (.x(a_r), .lead(la_odd), .xp(ap));

  // (l_A - 2K + 1) / 2 with l_A odd equals l_A[LAW-1:1] - (K-1).
  assign half = signed'(HW'(la_odd >> 1)) - signed'(HW'(K - 1));

  seq_sqrt_core #(.W(K)) u_core (
    .clk  (clk),
    .rst_n(rst_n),
    .load (state == S_PREP),
    .a    (ap),
    .busy (core_busy),
    .last (core_last),
    .valid(core_valid),
    .q    (root)
  );

  always_comb begin
    if (half_r >= 0)
      qn = N'(root) << unsigned'(half_r);
    else
      qn = N'(root) >> unsigned'(-half_r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      a_r    <= '0;
      half_r <= '0;
      q      <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_r   <= a;
          state <= S_PREP;
        end
        S_PREP: begin
          half_r <= half;
          state  <= S_ITER;
        end
        S_ITER: if (core_last) state <= S_OUTP;
        S_OUTP: begin
          q     <= qn;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_core_ready: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_OUTP |-> core_valid && !core_busy);
endmodule
