// lut_sqrt - lookup-table square-root circuit.
//
// A read-only table of 2^(2W) entries holds floor(sqrt(i)) for every
// radicand i; the radicand is the read address. The table is filled at
// elaboration by the constant function aa_pkg::isqrt, so no data file is
// needed; synthesis turns it into a ROM or logic. No interpolation is used,
// so the table grows as 4^W and the circuit is meant for small W (the
// approximate SQR circuit only ever feeds it a 2k-bit pruned radicand).
// Purely combinational. A table without interpolation follows the method;
// filling it by a constant function is this design's choice.
module lut_sqrt #(
  parameter int unsigned W = 3
) (
  input  logic [2*W-1:0] a,
  output logic [W-1:0]   q
);
  localparam int unsigned DEPTH = 2 ** (2 * W);

  logic [W-1:0] rom [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_rom
    assign rom[i] = W'(aa_pkg::isqrt(i));
  end

  assign q = rom[a];
endmodule
