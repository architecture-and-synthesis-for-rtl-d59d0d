// tb_rdr_lcc: self-checking test of the local computational cluster in its
// three configurations (ALU only, multiplier only, all three units): routing of each op to
// its unit, y = 0 and bad_op for an op whose unit is absent, y = 0 for FU_NOP.
module tb_rdr_lcc;
  import rdr_pkg::*;
  localparam int unsigned W = DATA_W, FRAC = FRAC_W;

  fu_op_e              op;
  logic signed [W-1:0] a, b;
  logic signed [W-1:0] y_a, y_m, y_b;
  logic                bad_a, bad_m, bad_b;
  int checks = 0, failures = 0;

  rdr_lcc #(.W(W), .FRAC(FRAC), .HAS_ALU(1'b1), .HAS_MUL(1'b0)) u_a (.op(op), .a(a), .b(b), .y(y_a), .bad_op(bad_a));
  rdr_lcc #(.W(W), .FRAC(FRAC), .HAS_ALU(1'b0), .HAS_MUL(1'b1)) u_m (.op(op), .a(a), .b(b), .y(y_m), .bad_op(bad_m));
  rdr_lcc #(.W(W), .FRAC(FRAC), .HAS_ALU(1'b1), .HAS_MUL(1'b1), .HAS_DIV(1'b1)) u_b (.op(op), .a(a), .b(b), .y(y_b), .bad_op(bad_b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s op=%s a=%0d b=%0d", what, op.name(), a, b);
    end
  endtask

  initial begin
    for (int k = 0; k < 1000; k++) begin
      logic signed [W-1:0] e;
      longint p;
      op = fu_op_e'($urandom_range(0, 4));
      a = W'($urandom); b = W'($urandom);
      #1;
      p = (longint'(a) * longint'(b)) >>> FRAC;
      case (op)
        FU_ADD:  e = a + b;
        FU_SUB:  e = a - b;
        FU_MUL:  e = p[W-1:0];
        FU_DIV:  begin
          longint q;
          q = (b == 0) ? 0 : longint'(a) / longint'(b);
          e = q[W-1:0];
        end
        default: e = '0;
      endcase
      chk(y_b == e && !bad_b, "full cluster");
      if (op == FU_DIV) begin
        chk(y_a == 0 && bad_a && y_m == 0 && bad_m, "clusters without divider reject DIV");
      end else if (op == FU_MUL) begin
        chk(y_a == 0 && bad_a,  "ALU-only cluster rejects MUL");
        chk(y_m == e && !bad_m, "MUL-only cluster");
      end else if (op == FU_NOP) begin
        chk(y_a == 0 && !bad_a && y_m == 0 && !bad_m, "NOP");
      end else begin
        chk(y_a == e && !bad_a, "ALU-only cluster");
        chk(y_m == 0 && bad_m,  "MUL-only cluster rejects add/sub");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
