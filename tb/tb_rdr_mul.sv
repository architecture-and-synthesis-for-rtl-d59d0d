// tb_rdr_mul: self-checking test of the fixed-point multiplier,
// y = (a*b) >>> FRAC truncated to W bits, against a 64-bit reference.
module tb_rdr_mul;
  import rdr_pkg::*;
  localparam int unsigned W = DATA_W, FRAC = FRAC_W;

  logic signed [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  rdr_mul #(.W(W), .FRAC(FRAC)) dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int av, int bv);
    longint p;
    logic signed [W-1:0] exp;
    a = W'(av); b = W'(bv);
    #1;
    p = longint'(a) * longint'(b);
    p = p >>> FRAC;
    exp = p[W-1:0];
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL a=%0d b=%0d y=%0d exp=%0d", a, b, y, exp);
    end
  endtask

  initial begin
    one(100, 16384);     // x 1.0
    one(100, 8192);      // x 0.5
    one(-100, 8192);     // negative, floor
    one(-1, 1);          // -1/16384 floors to -1
    one(-32768, -32768);
    one(32767, -16384);
    for (int k = 0; k < 2000; k++) one(int'($urandom), int'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
