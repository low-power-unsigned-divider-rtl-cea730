// seq_div_core - sequential restoring 2W/W unsigned divider.
//
// One shifted subtraction per clock: the partial remainder, extended by the
// next dividend bit, is compared with the divisor by a single W+1-bit
// subtractor; on success the difference is kept and a quotient bit of 1 is
// shifted in, otherwise the remainder is restored and a 0 is shifted in.
// The dividend's low half and the quotient share one shift register.
//
// Interface: 'load' (ignored while busy) captures a and b; the W
// iterations happen on the following W clock edges. 'last' is high during
// the cycle whose closing edge performs the final iteration; 'valid' rises
// with that edge and stays high, with q stable, until the next load.
// The caller must keep a[2W-1:W] < b. Asynchronous active-low reset.
// One subtraction per cycle follows the method; the register layout and
// the load/last/valid interface are this design's.
module seq_div_core #(
  parameter int unsigned W = 4,
  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [2*W-1:0] a,
  input  logic [W-1:0]   b,
  output logic           busy,
  output logic           last,
  output logic           valid,
  output logic [W-1:0]   q
);
  logic [W-1:0]  rem;
  logic [W-1:0]  dq;     // dividend low half, then quotient
  logic [W-1:0]  dv;
  logic [CW-1:0] cnt;
  logic [W:0]    m;      // shifted partial remainder
  logic [W-1:0]  diff;
  logic          qbit;

  always_comb begin
    m    = {rem, dq[W-1]};
    diff = W'(m - {1'b0, dv});
    qbit = (m >= {1'b0, dv});
    last = busy && (cnt == CW'(W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem   <= '0;
      dq    <= '0;
      dv    <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      valid <= 1'b0;
    end else if (!busy) begin
      if (load) begin
        rem   <= a[2*W-1:W];
        dq    <= a[W-1:0];
        dv    <= b;
        cnt   <= '0;
        busy  <= 1'b1;
        valid <= 1'b0;
      end
    end else begin
      rem <= qbit ? diff : m[W-1:0];
      dq  <= {dq[W-2:0], qbit};
      cnt <= cnt + 1'b1;
      if (last) begin
        busy  <= 1'b0;
        valid <= 1'b1;
      end
    end
  end

  assign q = dq;
endmodule
