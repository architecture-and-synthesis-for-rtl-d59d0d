// rdr_lcc: local computational cluster (LCC) of one RDR island.
//
// The cluster holds the island's functional units. Which units an island gets
// is decided by placement: units placed in the same island form its cluster.
// This cluster can hold one add/subtract ALU, one multiplier and one divider
// (HAS_ALU/HAS_MUL/HAS_DIV), the three unit kinds the architecture names; in
// the DCT example every island holds exactly one ALU or one multiplier.
//
// Timing: combinational. The operands come from the island's operand
// multiplexers in the same cycle and the result is written to a register at the
// next clock edge (intra-island computation fits in one cycle by construction
// of the island size).
//
// Interface: op = FU_ADD/FU_SUB go to the ALU, FU_MUL to the multiplier,
// FU_DIV to the divider, FU_NOP gives y = 0. An operation whose unit is absent gives y = 0 and raises
// bad_op for that cycle.
module rdr_lcc
  import rdr_pkg::*;
#(
  parameter int unsigned W       = DATA_W,
  parameter int unsigned FRAC    = FRAC_W,
  parameter bit          HAS_ALU = 1'b1,
  parameter bit          HAS_MUL = 1'b1,
  parameter bit          HAS_DIV = 1'b0
) (
  input  fu_op_e              op,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y,
  output logic                bad_op
);

  logic signed [W-1:0] alu_y;
  logic signed [W-1:0] mul_y;
  logic signed [W-1:0] div_y;

  if (HAS_ALU) begin : g_alu
    rdr_alu #(.W(W)) u_alu (.op(op), .a(a), .b(b), .y(alu_y));
  end else begin : g_no_alu
    assign alu_y = '0;
  end

  if (HAS_MUL) begin : g_mul
    rdr_mul #(.W(W), .FRAC(FRAC)) u_mul (.a(a), .b(b), .y(mul_y));
  end else begin : g_no_mul
    assign mul_y = '0;
  end

  if (HAS_DIV) begin : g_div
    rdr_div #(.W(W)) u_div (.a(a), .b(b), .y(div_y));
  end else begin : g_no_div
    assign div_y = '0;
  end

  always_comb begin
    y      = '0;
    bad_op = 1'b0;
    unique case (op)
      FU_ADD, FU_SUB: begin
        y      = alu_y;
        bad_op = !HAS_ALU;
      end
      FU_MUL: begin
        y      = mul_y;
        bad_op = !HAS_MUL;
      end
      FU_DIV: begin
        y      = div_y;
        bad_op = !HAS_DIV;
      end
      default: ;
    endcase
  end

endmodule
