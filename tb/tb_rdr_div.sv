// tb_rdr_div: self-checking test of the divider: random and corner operands
// against a 64-bit reference (truncation toward zero, b = 0 gives 0).
module tb_rdr_div;
  import rdr_pkg::*;
  localparam int unsigned W = DATA_W;

  logic signed [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  rdr_div #(.W(W)) dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int av, int bv);
    longint q;
    logic signed [W-1:0] exp;
    a = W'(av); b = W'(bv);
    #1;
    q = (b == 0) ? 0 : longint'(a) / longint'(b);
    exp = q[W-1:0];
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL a=%0d b=%0d y=%0d exp=%0d", a, b, y, exp);
    end
  endtask

  initial begin
    one(7, 2); one(-7, 2); one(7, -2); one(-7, -2);
    one(5, 0); one(-32768, -1); one(-32768, 1); one(32767, 32767);
    for (int k = 0; k < 2000; k++) one(int'($urandom), int'($urandom_range(0, 40)) - 20);
    for (int k = 0; k < 2000; k++) one(int'($urandom), int'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
