// tb_rdr_island: self-checking test of one island with both units, 4 links,
// 2 banks and a 4-step test program that uses every kind of operand, write
// source and link driver:
//   step 0: r1.0 <= e0 + e1, FU result also driven on FU net of link 0
//   step 1: r2.1 <= r1.0 * (register net in on link 1)
//   step 2: r1.1 <= FU net in on link 2; link 0 register net <= r2.1
//   step 3: r1.0 <= r1.1 - e2; link 3 register net <= r2.1; link 1 <= r1.1
// Expected values are computed in the testbench from the stimulus.
module tb_rdr_island;
  import rdr_pkg::*;
  localparam int unsigned W = DATA_W, FRAC = FRAC_W, N = 4, NP = 4, NE = 3;
  typedef ctrl_t [N-1:0] prog_t;

  function automatic prog_t mkprog();
    prog_t p = '0;
    p[0].op = FU_ADD; p[0].a = s_ext(0); p[0].b = s_ext(1);
    p[0].wr = w_fu(1, 0); p[0].xo_fu[0] = 1'b1;
    p[1].op = FU_MUL; p[1].a = s_reg(1, 0); p[1].b = s_wire(1);
    p[1].wr = w_fu(2, 1);
    p[2].wr = w_wfu(2, 1, 1); p[2].xo_reg[0] = x_reg(2, 1);
    p[3].op = FU_SUB; p[3].a = s_reg(1, 1); p[3].b = s_ext(2);
    p[3].wr = w_fu(1, 0); p[3].xo_reg[3] = x_reg(2, 1); p[3].xo_reg[1] = x_reg(1, 1);
    return p;
  endfunction
  localparam prog_t PROG = mkprog();

  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  logic signed [W-1:0] ext [NE];
  logic signed [W-1:0] xr_in [NP], xf_in [NP], xr_out [NP], xf_out [NP];
  logic signed [W-1:0] rf_q [2][2];
  logic busy, done, hold_err, bad_op;
  int checks = 0, failures = 0;

  rdr_island #(.W(W), .FRAC(FRAC), .HAS_ALU(1'b1), .HAS_MUL(1'b1), .NBANKS(2), .NREGS(2),
               .NPORT(NP), .NEXT(NE), .NSTEPS(N), .PROG(PROG)) dut (.*);

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

  task automatic links_quiet(int s, int except_r, int except_f);
    for (int p = 0; p < int'(NP); p++) begin
      if (p != except_r) chk(xr_out[p] == 0, $sformatf("step %0d link %0d register net idle", s, p));
      if (p != except_f) chk(xf_out[p] == 0, $sformatf("step %0d link %0d FU net idle", s, p));
    end
  endtask

  initial begin
    for (int i = 0; i < int'(NE); i++) ext[i] = 0;
    for (int p = 0; p < int'(NP); p++) begin xr_in[p] = 0; xf_in[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      logic signed [W-1:0] e0, e1, e2, wr1, wf2, n0, n1, n2, n3;
      e0 = W'($urandom); e1 = W'($urandom); e2 = W'($urandom);
      wr1 = W'($urandom); wf2 = W'($urandom);
      n0 = e0 + e1; n1 = fmul(n0, wr1); n2 = wf2; n3 = n2 - e2;
      ext = '{e0, e1, e2};
      start = 1; @(negedge clk); start = 0;
      // step 0
      chk(busy, "busy");
      chk(xf_out[0] == n0, "step 0 FU net carries e0+e1");
      links_quiet(0, -1, 0);
      // other inputs noisy except the one read in each step
      @(negedge clk);
      // step 1: the multiplier reads link 1
      for (int p = 0; p < int'(NP); p++) begin xr_in[p] = W'($urandom); xf_in[p] = W'($urandom); end
      xr_in[1] = wr1;
      chk(rf_q[0][0] == n0, "r1.0 = e0+e1");
      links_quiet(1, -1, -1);
      @(negedge clk);
      // step 2: the register file takes the FU net of link 2
      for (int p = 0; p < int'(NP); p++) begin xr_in[p] = W'($urandom); xf_in[p] = W'($urandom); end
      xf_in[2] = wf2;
      chk(rf_q[1][1] == n1, "r2.1 = r1.0 * link 1");
      chk(xr_out[0] == n1, "step 2 link 0 drives r2.1");
      links_quiet(2, 0, -1);
      @(negedge clk);
      // step 3
      for (int p = 0; p < int'(NP); p++) begin xr_in[p] = W'($urandom); xf_in[p] = W'($urandom); end
      chk(rf_q[0][1] == n2, "r1.1 = FU net of link 2");
      chk(xr_out[3] == n1 && xr_out[1] == n2, "step 3 links 3 and 1");
      chk(xr_out[0] == 0 && xr_out[2] == 0, "step 3 links 0 and 2 idle");
      @(negedge clk);
      chk(done && !busy, "done after 4 steps");
      chk(rf_q[0][0] == n3, "r1.0 = r1.1 - e2");
      chk(rf_q[1][1] == n1 && rf_q[0][1] == n2, "registers hold");
      links_quiet(4, -1, -1);
      chk(!hold_err && !bad_op, "no error flags");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
