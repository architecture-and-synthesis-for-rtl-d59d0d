// tb_rdr_regfile: self-checking test of the banked register file at its
// default size (7 banks). A shadow model tracks contents and the cycle of the
// last write of every register. Phase 1 makes random writes that respect the
// hold time of each bank (bank j: no rewrite for j cycles) and checks every
// register every cycle and that hold_err stays low. Phase 2 rewrites a bank-j
// register j-1 cycles after writing it and expects hold_err (sticky), then a
// reset, then an out-of-range write, which must be flagged and not stored.
module tb_rdr_regfile;
  import rdr_pkg::*;
  localparam int unsigned W = DATA_W, NB = MAX_BANKS, NR = 4;

  logic clk = 0, rst_n = 1, we = 0;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  logic [2:0] wbank = 0, widx = 0;
  logic signed [W-1:0] wdata = 0;
  logic signed [W-1:0] q [NB][NR];
  logic hold_err;
  int checks = 0, failures = 0;

  logic signed [W-1:0] model [NB][NR];
  int                  last  [NB][NR];
  int                  cyc = 0;

  rdr_regfile #(.W(W), .NBANKS(NB), .NREGS(NR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic compare_all();
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < NR; r++)
        chk(q[b][r] == model[b][r], $sformatf("bank %0d reg %0d = %0d, expected %0d", b + 1, r, q[b][r], model[b][r]));
  endtask

  initial begin
    for (int b = 0; b < NB; b++) for (int r = 0; r < NR; r++) begin model[b][r] = 0; last[b][r] = -100; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare_all();
    // Phase 1: legal traffic.
    for (int k = 0; k < 600; k++) begin
      int b, r;
      b = $urandom_range(0, NB - 1); r = $urandom_range(0, NR - 1);
      we = 0;
      if ($urandom_range(0, 3) != 0 && cyc - last[b][r] >= b + 1) begin
        we = 1; wbank = 3'(b + 1); widx = 3'(r); wdata = W'($urandom);
      end
      @(negedge clk);
      if (we) begin model[b][r] = wdata; last[b][r] = cyc; end
      cyc++;
      compare_all();
      chk(!hold_err, "no hold violation on legal traffic");
    end
    we = 0;
    // Phase 2: early rewrite of a bank-3 register (allowed after 3 cycles).
    @(negedge clk);
    we = 1; wbank = 3; widx = 2; wdata = 16'sd1234;
    @(negedge clk);
    we = 0;
    @(negedge clk);
    chk(!hold_err, "no error 1 cycle after write");
    we = 1; wbank = 3; widx = 2; wdata = 16'sd99;   // 2 cycles after: too early
    @(negedge clk);
    we = 0;
    chk(hold_err, "early rewrite flagged");
    chk(q[2][2] == 16'sd99, "early rewrite still stored");
    repeat (3) @(negedge clk);
    chk(hold_err, "hold_err sticky");
    rst_n = 0; @(negedge clk); rst_n = 1;
    chk(!hold_err && q[2][2] == 0, "reset clears");
    // Bank 1: back-to-back writes are legal.
    we = 1; wbank = 1; widx = 0; wdata = 16'sd5; @(negedge clk);
    wdata = 16'sd6; @(negedge clk);
    we = 0;
    chk(!hold_err && q[0][0] == 16'sd6, "bank 1 back-to-back legal");
    // Out of range bank 0 and index NR.
    we = 1; wbank = 0; widx = 0; wdata = 16'sd77; @(negedge clk);
    we = 0;
    chk(hold_err, "bank 0 flagged");
    chk(q[0][0] == 16'sd6, "bank 0 write not stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
