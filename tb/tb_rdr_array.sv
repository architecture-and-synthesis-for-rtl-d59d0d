// tb_rdr_array: self-checking test of the island array with a configuration
// other than the DCT example: six islands in two rows of three (0 1 2 over
// 3 4 5).
//   * link 0: a long wire between island 0 (top left) and island 4 (bottom
//     middle) that passes over other islands and takes 2 cycles;
//   * link 1: a short wire between the neighbours 4 and 5.
// Islands 1, 2 and 3 are unconnected and idle.
// Program, 4 steps:
//   island 5: step 0  r = e0 + e1, chained onto link 1 (FU-driven net)
//   island 4: step 0  r1.1 <= that value (from the FU-driven net)
//   island 0: step 0  r2.0 <= e0 + e1; steps 1-2 drive it on link 0 (2 cycles)
//   island 4: step 1  r2.1 <= r1.1 * e1
//   island 4: step 2  r1.0 <= (link 0) * e0      reads the 2-cycle wire
//   island 4: step 3  drive r1.0 on link 1
//   island 5: step 3  r1.0 <= (link 1) - e0
// Expected results are computed from the stimulus. A second, one-island array
// runs a program that rewrites a bank-2 register one cycle after writing it and
// asks an ALU-only island to multiply: hold_err and bad_op must rise.
module tb_rdr_array;
  import rdr_pkg::*;
  localparam int unsigned W = DATA_W, FRAC = FRAC_W;
  localparam int unsigned NI = 6, NB = 2, NR = 2, NP = 2, NE = 2, NS = 4;
  typedef ctrl_t [NS-1:0] prog_t;
  typedef prog_t [NI-1:0] aprog_t;
  typedef logic [NI-1:0][NP-1:0][7:0] tab_t;

  function automatic aprog_t mkprog();
    aprog_t a = '0;
    a[5][0].op = FU_ADD; a[5][0].a = s_ext(0); a[5][0].b = s_ext(1); a[5][0].xo_fu[1] = 1'b1;
    a[4][0].wr = w_wfu(1, 1, 1);
    a[0][0].op = FU_ADD; a[0][0].a = s_ext(0); a[0][0].b = s_ext(1); a[0][0].wr = w_fu(2, 0);
    a[0][1].xo_reg[0] = x_reg(2, 0);
    a[0][2].xo_reg[0] = x_reg(2, 0);
    a[4][1].op = FU_MUL; a[4][1].a = s_reg(1, 1); a[4][1].b = s_ext(1); a[4][1].wr = w_fu(2, 1);
    a[4][2].op = FU_MUL; a[4][2].a = s_wire(0); a[4][2].b = s_ext(0); a[4][2].wr = w_fu(1, 0);
    a[4][3].xo_reg[1] = x_reg(1, 0);
    a[5][3].op = FU_SUB; a[5][3].a = s_wire(1); a[5][3].b = s_ext(0); a[5][3].wr = w_fu(1, 0);
    return a;
  endfunction

  function automatic tab_t mkisl();
    tab_t t = '1;           // 255: unconnected
    t[0][0] = 8'd4;  t[4][0] = 8'd0;
    t[4][1] = 8'd5;  t[5][1] = 8'd4;
    return t;
  endfunction

  function automatic tab_t mkport();
    tab_t t = '0;
    t[0][0] = 8'd0;  t[4][0] = 8'd0;
    t[4][1] = 8'd1;  t[5][1] = 8'd1;
    return t;
  endfunction

  function automatic prog_t mkbad();
    prog_t p = '0;
    p[0].op = FU_ADD; p[0].a = s_ext(0); p[0].b = s_ext(1); p[0].wr = w_fu(2, 0);
    p[1].op = FU_ADD; p[1].a = s_ext(0); p[1].b = s_ext(0); p[1].wr = w_fu(2, 0);  // too early
    p[2].op = FU_MUL; p[2].a = s_ext(0); p[2].b = s_ext(1);                        // no multiplier
    return p;
  endfunction

  localparam aprog_t PROG = mkprog();
  localparam tab_t   LISL = mkisl();
  localparam tab_t   LPRT = mkport();
  localparam prog_t  BAD  = mkbad();

  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  logic signed [W-1:0] ext  [NI][NE];
  logic signed [W-1:0] rf_q [NI][NB][NR];
  logic busy, done, hold_err, bad_op;
  logic signed [W-1:0] ext1  [1][NE];
  logic signed [W-1:0] rf_q1 [1][NB][NR];
  logic busy1, done1, hold_err1, bad_op1;
  int checks = 0, failures = 0;

  rdr_array #(.W(W), .FRAC(FRAC), .NISL(NI), .NBANKS(NB), .NREGS(NR), .NPORT(NP), .NEXT(NE),
              .NSTEPS(NS), .HAS_ALU(6'b111111), .HAS_MUL(6'b010000), .HAS_DIV('0),
              .PROG(PROG), .LINK_ISL(LISL), .LINK_PORT(LPRT))
    dut (.clk, .rst_n, .start, .ext, .rf_q, .busy, .done, .hold_err, .bad_op);

  rdr_array #(.W(W), .FRAC(FRAC), .NISL(1), .NBANKS(NB), .NREGS(NR), .NPORT(NP), .NEXT(NE),
              .NSTEPS(NS), .HAS_ALU(1'b1), .HAS_MUL(1'b0), .HAS_DIV(1'b0),
              .PROG(BAD), .LINK_ISL('1), .LINK_PORT('0))
    bad (.clk, .rst_n, .start, .ext(ext1), .rf_q(rf_q1), .busy(busy1), .done(done1),
         .hold_err(hold_err1), .bad_op(bad_op1));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic signed [W-1:0] fmul(logic signed [W-1:0] a, logic signed [W-1:0] b);
    longint p;
    p = (longint'(a) * longint'(b)) >>> FRAC;
    return p[W-1:0];
  endfunction

  initial begin
    for (int i = 0; i < int'(NI); i++) for (int e = 0; e < int'(NE); e++) ext[i][e] = 0;
    ext1[0][0] = 16'sd3; ext1[0][1] = 16'sd4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 25; k++) begin
      logic signed [W-1:0] s5, s0, r41, r40, r50;
      int cyc;
      for (int i = 0; i < int'(NI); i++) for (int e = 0; e < int'(NE); e++) ext[i][e] = W'($urandom);
      s5  = ext[5][0] + ext[5][1];
      s0  = ext[0][0] + ext[0][1];
      r41 = fmul(s5, ext[4][1]);
      r40 = fmul(s0, ext[4][0]);
      r50 = r40 - ext[5][0];
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done && cyc < 20) begin @(negedge clk); cyc++; end
      chk(done && cyc - 1 == int'(NS), $sformatf("done %0d cycles after the start edge", cyc - 1));
      chk(rf_q[4][0][1] == s5,  "island 4 took the FU-driven net of island 5");
      chk(rf_q[0][1][0] == s0,  "island 0 bank-2 register");
      chk(rf_q[4][1][1] == r41, "island 4 multiply of a local register");
      chk(rf_q[4][0][0] == r40, "island 4 read the 2-cycle long wire");
      chk(rf_q[5][0][0] == r50, "island 5 read the short wire");
      for (int i = 1; i <= 3; i++) chk(rf_q[i][0][0] == 0 && rf_q[i][1][0] == 0, "idle islands untouched");
      chk(!hold_err && !bad_op, "no error flags on a legal program");
      chk(hold_err1, "early rewrite of a bank-2 register flagged");
      chk(bad_op1, "multiply on an ALU-only island flagged");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
