// rdr_div: divider functional unit of a local computational cluster.
//
// The architecture lists dividers next to adders and multipliers as members of
// an island's cluster but does not describe one, so this is the simplest unit
// that divides: a combinational signed integer divider, y = a / b rounded
// toward zero (SystemVerilog semantics), W-bit two's complement. The corner
// cases are this design's choice: b = 0 gives y = 0, and -2^(W-1) / -1 wraps to
// -2^(W-1). Like the other units it completes within the island's cycle; a
// real design would size the island or the clock period for its delay.
module rdr_div
  import rdr_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);

  logic signed [W:0] a_x, b_x, q;

  always_comb begin
    // One extra bit so that -2^(W-1) / -1 does not overflow the division.
    a_x = {a[W-1], a};
    b_x = {b[W-1], b};
    if (b == '0) q = '0;
    else         q = a_x / b_x;
    y   = q[W-1:0];
  end

endmodule
