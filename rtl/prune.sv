// prune - adaptive operand pruning.
//
// Keeps OUT_W consecutive bits of x, starting at its leading one position
// 'lead', so that the leading one lands on bit OUT_W-1 of xp:
//   lead >= OUT_W-1 : xp = x >> (lead-OUT_W+1)   (the LSBs below the kept
//                     window are truncated)
//   lead <  OUT_W-1 : xp = x << (OUT_W-1-lead)   (zeros are appended at the
//                     LSBs)
// In both cases x is approximated by xp * 2^(lead-OUT_W+1). The SQR circuit
// passes a leading position forced to an odd value, so bit OUT_W-1 of xp may
// then be 0. Purely combinational: a barrel shifter whose direction and
// amount come from 'lead'. Both pruning schemes follow the document; the
// shifter form is this design's.
module prune #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 6,
  localparam int unsigned LW = (IN_W > 1) ? $clog2(IN_W) : 1
) (
  input  logic [IN_W-1:0]  x,
  input  logic [LW-1:0]    lead,
  output logic [OUT_W-1:0] xp
);
  // Working width large enough for both directions.
  localparam int unsigned XW = IN_W + OUT_W;

  always_comb begin
    if (int'(lead) >= int'(OUT_W) - 1)
      xp = OUT_W'(XW'(x) >> (int'(lead) - int'(OUT_W) + 1));
    else
      xp = OUT_W'(XW'(x) << (int'(OUT_W) - 1 - int'(lead)));
  end
endmodule
