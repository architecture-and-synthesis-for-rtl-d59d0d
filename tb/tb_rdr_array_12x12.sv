// tb_rdr_array_12x12: the island array at the size of a 70 nm, 5 GHz die:
// 12x12 islands, register files with 7 banks because a wire needs up to 7
// cycles from corner to corner.
//
// Island numbering is row-major (island 12*r + c). Link 0 of island 0 (top
// left) and link 0 of island 143 (bottom right) form a corner-to-corner wire
// that takes 7 cycles; link 1 joins island 143 to its neighbour 142 with a
// short wire. All other islands are present but idle.
// Program, 9 steps:
//   island 0:   step 0     r7.0 <= e0 + e1 (bank 7: held for 7 cycles)
//               steps 1-7  drive r7.0 on the corner-to-corner wire
//   island 143: step 7     r1.0 <= (link 0) * e0   last cycle of the 7-cycle path
//               step 8     drive r1.0 on link 1
//   island 142: step 8     r1.0 <= (link 1) + e0   chained short wire + add
// The test checks the results against a model, the 9-cycle latency, that no
// hold violation occurs, and that the idle islands stay at 0. A second run
// repeats it with new operands.
module tb_rdr_array_12x12;
  import rdr_pkg::*;
  localparam int unsigned W = DATA_W, FRAC = FRAC_W;
  localparam int unsigned NI = 144, NB = 7, NR = 1, NP = 2, NE = 2, NS = 9;
  localparam int unsigned CORNER_A = 0, CORNER_B = 143, NEIGH = 142;
  typedef ctrl_t [NS-1:0] prog_t;
  typedef prog_t [NI-1:0] aprog_t;
  typedef logic [NI-1:0][NP-1:0][7:0] tab_t;

  function automatic aprog_t mkprog();
    aprog_t a;
    for (int i = 0; i < int'(NI); i++)
      for (int s = 0; s < int'(NS); s++) a[i][s] = CTRL_NOP;
    a[CORNER_A][0].op = FU_ADD; a[CORNER_A][0].a = s_ext(0); a[CORNER_A][0].b = s_ext(1);
    a[CORNER_A][0].wr = w_fu(7, 0);
    for (int s = 1; s <= 7; s++) a[CORNER_A][s].xo_reg[0] = x_reg(7, 0);
    a[CORNER_B][7].op = FU_MUL; a[CORNER_B][7].a = s_wire(0); a[CORNER_B][7].b = s_ext(0);
    a[CORNER_B][7].wr = w_fu(1, 0);
    a[CORNER_B][8].xo_reg[1] = x_reg(1, 0);
    a[NEIGH][8].op = FU_ADD; a[NEIGH][8].a = s_wire(1); a[NEIGH][8].b = s_ext(0);
    a[NEIGH][8].wr = w_fu(1, 0);
    return a;
  endfunction

  function automatic tab_t mkisl();
    tab_t t = '1;
    t[CORNER_A][0] = 8'(CORNER_B);  t[CORNER_B][0] = 8'(CORNER_A);
    t[CORNER_B][1] = 8'(NEIGH);     t[NEIGH][1]    = 8'(CORNER_B);
    return t;
  endfunction

  function automatic tab_t mkport();
    tab_t t = '0;
    t[CORNER_B][1] = 8'd1;  t[NEIGH][1] = 8'd1;
    return t;
  endfunction

  function automatic logic [NI-1:0] only(int unsigned i);
    logic [NI-1:0] m = '0;
    m[i] = 1'b1;
    return m;
  endfunction

  localparam aprog_t        PROG = mkprog();
  localparam tab_t          LISL = mkisl();
  localparam tab_t          LPRT = mkport();
  localparam logic [NI-1:0] MULS = only(CORNER_B);

  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  logic signed [W-1:0] ext  [NI][NE];
  logic signed [W-1:0] rf_q [NI][NB][NR];
  logic busy, done, hold_err, bad_op;
  int checks = 0, failures = 0;

  rdr_array #(.W(W), .FRAC(FRAC), .NISL(NI), .NBANKS(NB), .NREGS(NR), .NPORT(NP), .NEXT(NE),
              .NSTEPS(NS), .HAS_ALU(~MULS), .HAS_MUL(MULS), .HAS_DIV('0),
              .PROG(PROG), .LINK_ISL(LISL), .LINK_PORT(LPRT))
    dut (.clk, .rst_n, .start, .ext, .rf_q, .busy, .done, .hold_err, .bad_op);

  always #5 clk = ~clk;

  initial begin
    #10000;
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
    for (int i = 0; i < int'(NI); i++) for (int e = 0; e < int'(NE); e++) ext[i][e] = W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2; k++) begin
      logic signed [W-1:0] s0, m, r;
      int cyc, nonzero;
      for (int i = 0; i < int'(NI); i++) for (int e = 0; e < int'(NE); e++) ext[i][e] = W'($urandom);
      s0 = ext[CORNER_A][0] + ext[CORNER_A][1];
      m  = fmul(s0, ext[CORNER_B][0]);
      r  = m + ext[NEIGH][0];
      start = 1; @(negedge clk); start = 0;
      cyc = 0;
      while (!done && cyc < 30) begin @(negedge clk); cyc++; end
      chk(done && cyc == int'(NS), $sformatf("done %0d cycles after the start edge", cyc));
      chk(rf_q[CORNER_A][6][0] == s0, "corner island bank-7 register");
      chk(rf_q[CORNER_B][0][0] == m,  "opposite corner read the 7-cycle wire");
      chk(rf_q[NEIGH][0][0] == r,     "neighbour read the short wire");
      nonzero = 0;
      for (int i = 1; i < 142; i++)
        for (int b = 0; b < int'(NB); b++) if (rf_q[i][b][0] != 0) nonzero++;
      chk(nonzero == 0, "idle islands untouched");
      chk(!hold_err && !bad_op, "no error flags");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
