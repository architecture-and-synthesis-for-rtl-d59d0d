// tb_rdr_alu: self-checking test of the add/subtract unit. Random and corner
// operands for FU_ADD and FU_SUB against an independent wrap-around model; the
// other ops must give 0.
module tb_rdr_alu;
  import rdr_pkg::*;
  localparam int unsigned W = DATA_W;

  fu_op_e              op;
  logic signed [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  rdr_alu #(.W(W)) dut (.op(op), .a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(fu_op_e o, int av, int bv);
    int exp;
    op = o; a = W'(av); b = W'(bv);
    #1;
    case (o)
      FU_ADD:  exp = int'(a) + int'(b);
      FU_SUB:  exp = int'(a) - int'(b);
      default: exp = 0;
    endcase
    checks++;
    if (y !== W'(exp)) begin
      failures++;
      $display("FAIL op=%s a=%0d b=%0d y=%0d exp=%0d", o.name(), a, b, y, W'(exp));
    end
  endtask

  initial begin
    one(FU_ADD, 1, 2);
    one(FU_SUB, 1, 2);
    one(FU_ADD, 32767, 1);    // wraps
    one(FU_SUB, -32768, 1);   // wraps
    one(FU_MUL, 5, 7);
    one(FU_NOP, 5, 7);
    for (int k = 0; k < 2000; k++)
      one(fu_op_e'($urandom_range(0, 4)), int'($urandom), int'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
