// rdr_mul: fixed-point multiplier functional unit of a local computational
// cluster.
//
// In the DCT example of the architecture, MUL1 and MUL2 execute the
// multiplication nodes, each multiplying an intermediate value by a transform
// coefficient. A multiplication takes a full clock period of the example
// (2 ns), so it is written here as a single-cycle combinational unit whose
// result is registered by the island's register file.
//
// Interface: y = (a * b) >>> FRAC, truncated to W bits. b is read as a signed
// Q(W-FRAC).FRAC coefficient; the full 2W-bit product is formed, shifted
// arithmetically and its low W bits kept (wrap-around, truncation toward minus
// infinity). The format is this design's choice.
module rdr_mul
  import rdr_pkg::*;
#(
  parameter int unsigned W    = DATA_W,
  parameter int unsigned FRAC = FRAC_W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);

  logic signed [2*W-1:0] prod;
  logic signed [2*W-1:0] shifted;

  always_comb begin
    prod    = a * b;
    shifted = prod >>> FRAC;
    y       = shifted[W-1:0];
  end

endmodule
