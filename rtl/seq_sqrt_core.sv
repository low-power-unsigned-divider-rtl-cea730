// seq_sqrt_core - sequential restoring square root of a 2W-bit radicand.
//
// One root bit per clock: the next two radicand bits are brought down
// behind the partial remainder and the trial value 4*Q + 1 (the root found
// so far followed by '01') is subtracted by a single W+3-bit subtractor.
// On success the difference is kept and a 1 is appended to the root,
// otherwise the remainder is restored and a 0 is appended.
//
// Interface and timing as seq_div_core: 'load' (ignored while busy)
// captures a; W iterations follow on the next W edges; 'last' marks the
// cycle before the final edge; 'valid' rises with it and holds q until the
// next load. Asynchronous active-low reset. One root bit per cycle follows
// the method; the register layout and interface are this design's.
module seq_sqrt_core #(
  parameter int unsigned W = 3,
  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [2*W-1:0] a,
  output logic           busy,
  output logic           last,
  output logic           valid,
  output logic [W-1:0]   q
);
  logic [2*W-1:0] rad;    // radicand, consumed two bits at a time
  logic [W:0]     rem;    // partial remainder, never above 2*Q
  logic [W-1:0]   root;
  logic [CW-1:0]  cnt;
  logic [W+2:0]   m;
  logic [W+2:0]   t;
  logic           qbit;

  always_comb begin
    m    = {rem, rad[2*W-1:2*W-2]};
    t    = {1'b0, root, 2'b01};
    qbit = (m >= t);
    last = busy && (cnt == CW'(W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad   <= '0;
      rem   <= '0;
      root  <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      valid <= 1'b0;
    end else if (!busy) begin
      if (load) begin
        rad   <= a;
        rem   <= '0;
        root  <= '0;
        cnt   <= '0;
        busy  <= 1'b1;
        valid <= 1'b0;
      end
    end else begin
      rad  <= rad << 2;
      rem  <= qbit ? (W+1)'(m - t) : (W+1)'(m);
      root <= {root[W-2:0], qbit};
      cnt  <= cnt + 1'b1;
      if (last) begin
        busy  <= 1'b0;
        valid <= 1'b1;
      end
    end
  end

  assign q = root;
endmodule
