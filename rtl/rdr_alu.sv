// rdr_alu: add/subtract functional unit of a local computational cluster.
//
// The ALU is one of the unit types an island's cluster is built from; in the
// DCT example of the architecture, ALU1 and ALU2 execute the addition and
// subtraction nodes. It is purely combinational: the result is produced within
// the same clock cycle and written to a register at the next edge. Its delay is
// half of the example's 2 ns clock, which is what allows a short (1 ns)
// inter-island wire to be chained with it in one cycle.
//
// Interface: op selects FU_ADD (y = a + b) or FU_SUB (y = a - b); any other
// op gives y = 0. Arithmetic is W-bit two's complement and wraps on overflow
// (this design's choice; the width is not fixed by the architecture).
module rdr_alu
  import rdr_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  fu_op_e              op,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);

  always_comb begin
    unique case (op)
      FU_ADD:  y = a + b;
      FU_SUB:  y = a - b;
      default: y = '0;
    endcase
  end

endmodule
