// tb_rdr_island_fsm: self-checking test of the island controller with a
// 7-step program whose words are all different. Checks that ctrl is CTRL_NOP
// while idle, that step s issues PROG[s] in the (s+1)-th cycle after the start
// edge, busy for exactly NSTEPS cycles, done one cycle after the last step,
// that start is ignored while busy and that a start in the done cycle begins
// the next run at once.
module tb_rdr_island_fsm;
  import rdr_pkg::*;
  localparam int unsigned N = 7;
  typedef ctrl_t [N-1:0] prog_t;

  function automatic prog_t mkprog();
    prog_t p = '0;
    for (int s = 0; s < N; s++) begin
      p[s].op = fu_op_e'((s % 3) + 1);
      p[s].a  = s_ext(s % 4);
      p[s].wr = w_fu(1 + s % 2, s);
    end
    return p;
  endfunction
  localparam prog_t PROG = mkprog();

  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  ctrl_t ctrl;
  logic [$clog2(N+1)-1:0] step;
  logic busy, done;
  int checks = 0, failures = 0;

  rdr_island_fsm #(.NSTEPS(N), .PROG(PROG)) dut (.*);

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

  task automatic run(bit poke_start);
    start = 1; @(negedge clk); start = 0;
    for (int s = 0; s < int'(N); s++) begin
      chk(busy && !done, $sformatf("busy in step %0d", s));
      chk(ctrl == PROG[s], $sformatf("ctrl of step %0d", s));
      chk(int'(step) == s, $sformatf("step index %0d", s));
      start = poke_start && (s == 2);
      @(negedge clk);
      start = 0;
    end
    chk(done && !busy, "done after last step");
    chk(ctrl == CTRL_NOP, "NOP when idle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) begin
      chk(!busy && !done && ctrl == CTRL_NOP, "idle");
      @(negedge clk);
    end
    run(1'b0);
    @(negedge clk);
    chk(!done && !busy, "done is one cycle");
    run(1'b1);             // start while busy must be ignored
    @(negedge clk);
    chk(!busy, "start during busy ignored");
    run(1'b0);
    run(1'b0);             // back to back: start in the done cycle
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
