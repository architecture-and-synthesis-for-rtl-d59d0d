// tb_rdr_dct_top: end-to-end test of the 2x2 RDR DCT datapath at its default
// parameters.
//
// A reference model evaluates the 12-node graph with the same fixed-point
// rules (W-bit wrap-around add/sub, (a*b)>>>FRAC multiply), independent of the
// datapath's control programs. The test runs directed and random input sets,
// checks y0/y1, the 7-cycle start-to-done latency, that busy covers exactly the
// 7 steps, that a start given while busy is ignored (the inputs it carries must
// not affect the result), back-to-back operation (start in the done cycle),
// that every unit is busy in exactly the control steps of the schedule, and
// that the error flags stay low. It also counts how often each communication
// mechanism of the architecture was used and fails if one never was:
//   * chained FU + short wire into a far register (FU-driven link write),
//   * register + short wire chained into a far FU (wire operand, 1-cycle path),
//   * multi-cycle transfer: a bank-2 register driving a link for 2+ cycles,
//   * local register reuse (FU operand from a local register).
module tb_rdr_dct_top;
  import rdr_pkg::*;
  import rdr_dct_pkg::*;

  localparam int unsigned W    = DATA_W;
  localparam int unsigned FRAC = FRAC_W;
  localparam int unsigned LAT  = 7;

  logic                clk = 1'b0;
  logic                rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge for the asynchronous reset
  logic                start = 1'b0;
  logic signed [W-1:0] x [N_X];
  logic signed [W-1:0] c [N_C];
  logic                busy, done, hold_err, bad_op;
  logic signed [W-1:0] y0, y1;

  int checks = 0, failures = 0;
  int n_chain_fu = 0, n_chain_wire = 0, n_multi = 0, n_local = 0;
  int n_ignored = 0, n_b2b = 0, n_runs = 0;
  longint cycle = 0;

  rdr_dct_top dut (.*);

  always #1 clk = ~clk;  // 2 ns period, as in the example
  always @(posedge clk) cycle <= cycle + 1;

  // ---- reference model ------------------------------------------------------
  function automatic logic signed [W-1:0] fmul(logic signed [W-1:0] a, logic signed [W-1:0] b);
    longint p;
    p = longint'(a) * longint'(b);
    p = p >>> FRAC;
    return p[W-1:0];
  endfunction

  task automatic model(input logic signed [W-1:0] xi [N_X], input logic signed [W-1:0] ci [N_C],
                       output logic signed [W-1:0] e9, output logic signed [W-1:0] e10);
    logic signed [W-1:0] n1, n2, n3, n4, n5, n6, n7, n8, n11, n12;
    n1  = xi[0] + xi[1];
    n2  = xi[2] - xi[3];
    n3  = fmul(n1, ci[0]);
    n4  = fmul(n2, ci[1]);
    n5  = n3 + xi[4];
    n6  = n4 - xi[5];
    n7  = fmul(n5, ci[2]);
    n8  = fmul(n6, ci[3]);
    n11 = fmul(n5, ci[4]);
    n12 = fmul(n6, ci[5]);
    e9  = n7 + n8;
    e10 = n11 - n12;
  endtask

  // ---- mechanism counters (probe the island controllers) --------------------
  function automatic int count_ctrl(ctrl_t k);
    int m = 0;
    if (k.wr.we && k.wr.src == WS_WFU) n_chain_fu++;
    if (k.op != FU_NOP && (k.a.kind == SRC_WIRE || k.b.kind == SRC_WIRE)) n_chain_wire++;
    if (k.op != FU_NOP && (k.a.kind == SRC_REG || k.b.kind == SRC_REG)) n_local++;
    for (int p = 0; p < MAX_PORTS; p++) if (k.xo_reg[p].en && k.xo_reg[p].bank == 3'd2) m++;
    return m;
  endfunction

  // Occupation of each unit per control step 1..7 of the schedule
  // ("A" add/sub, "M" multiply, "-" idle), islands TL, TR, BL, BR.
  localparam string SCHED [4] = '{"-M--MM-", "A-A---A", "A-A---A", "-M--MM-"};
  int n_sched = 0;

  function automatic string op_class(fu_op_e o);
    case (o)
      FU_ADD, FU_SUB: return "A";
      FU_MUL:         return "M";
      default:        return "-";
    endcase
  endfunction

  task automatic check_sched(int isl, ctrl_t k, int step, bit busy_i);
    if (busy_i) begin
      n_sched++;
      if (op_class(k.op) != SCHED[isl].substr(step, step)) begin
        failures++;
        $display("FAIL: island %0d step %0d does %s, schedule says %s", isl, step + 1,
                 op_class(k.op), SCHED[isl].substr(step, step));
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      check_sched(0, dut.u_array.g_isl[0].u_isl.ctrl, int'(dut.u_array.g_isl[0].u_isl.u_fsm.step), dut.u_array.g_isl[0].u_isl.busy);
      check_sched(1, dut.u_array.g_isl[1].u_isl.ctrl, int'(dut.u_array.g_isl[1].u_isl.u_fsm.step), dut.u_array.g_isl[1].u_isl.busy);
      check_sched(2, dut.u_array.g_isl[2].u_isl.ctrl, int'(dut.u_array.g_isl[2].u_isl.u_fsm.step), dut.u_array.g_isl[2].u_isl.busy);
      check_sched(3, dut.u_array.g_isl[3].u_isl.ctrl, int'(dut.u_array.g_isl[3].u_isl.u_fsm.step), dut.u_array.g_isl[3].u_isl.busy);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      n_multi += count_ctrl(dut.u_array.g_isl[0].u_isl.ctrl);
      n_multi += count_ctrl(dut.u_array.g_isl[1].u_isl.ctrl);
      n_multi += count_ctrl(dut.u_array.g_isl[2].u_isl.ctrl);
      n_multi += count_ctrl(dut.u_array.g_isl[3].u_isl.ctrl);
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic randomize_inputs();
    for (int i = 0; i < N_X; i++) x[i] = W'($urandom);
    for (int i = 0; i < N_C; i++) c[i] = W'($urandom);
  endtask

  // Start a run with the current x/c; optionally disturb it with a start (and
  // different inputs) while busy; check result and latency.
  task automatic run_one(input bit disturb, input bit chain_next);
    logic signed [W-1:0] e9, e10;
    logic signed [W-1:0] xs [N_X];
    logic signed [W-1:0] cs [N_C];
    longint t0;
    int     busy_cycles;
    model(x, c, e9, e10);
    xs = x; cs = c;
    // Back-to-back: start in the very cycle that shows done of the last run.
    if (!(chain_next && done)) @(negedge clk);
    if (chain_next && done) n_b2b++;
    start = 1'b1;
    @(negedge clk);
    t0 = cycle;                // number of the edge that took start
    start = 1'b0;
    busy_cycles = 0;
    while (!done) begin
      if (busy) busy_cycles++;
      if (disturb && busy_cycles == 3) begin
        randomize_inputs();
        start = 1'b1;          // must be ignored
        n_ignored++;
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
      if (cycle - t0 > 40) break;
    end
    check(done, "done seen");
    check(cycle - t0 == longint'(LAT), $sformatf("latency %0d, expected %0d", cycle - t0, LAT));
    check(busy_cycles == int'(LAT), $sformatf("busy for %0d cycles", busy_cycles));
    check(y0 == e9,  $sformatf("y0 (n9) = %0d, expected %0d", y0, e9));
    check(y1 == e10, $sformatf("y1 (n10) = %0d, expected %0d", y1, e10));
    check(!hold_err && !bad_op, "error flags low");
    n_runs++;
    x = xs; c = cs;
  endtask

  initial begin
    #2000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_X; i++) x[i] = '0;
    for (int i = 0; i < N_C; i++) c[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !done && y0 == 0 && y1 == 0, "idle after reset");

    // Directed: x = 1..6 (in Q2.14 of 0.25 steps), c = 0.5 (8192).
    for (int i = 0; i < N_X; i++) x[i] = W'((i + 1) * 4096);
    for (int i = 0; i < N_C; i++) c[i] = W'(8192);
    run_one(1'b0, 1'b0);

    // Directed: unit coefficients (1.0 = 16384) and negative values.
    for (int i = 0; i < N_X; i++) x[i] = W'(-(i * 1000) + 300);
    for (int i = 0; i < N_C; i++) c[i] = W'(16384);
    c[3] = W'(-16384);
    run_one(1'b1, 1'b0);

    // Random, including a start during busy and back-to-back runs.
    for (int k = 0; k < 40; k++) begin
      randomize_inputs();
      run_one(k % 5 == 2, k % 3 != 0);
    end

    $display("mechanisms: chained-FU-write=%0d chained-wire-operand=%0d multi-cycle-link-cycles=%0d local-reg-operand=%0d start-ignored=%0d back-to-back=%0d runs=%0d",
             n_chain_fu, n_chain_wire, n_multi, n_local, n_ignored, n_b2b, n_runs);
    checks++;                // unit occupation matched the schedule (failures counted above)
    check(n_sched == 4 * int'(LAT) * n_runs, $sformatf("schedule checked in %0d island-steps", n_sched));
    check(n_chain_fu > 0,   "chained FU + short wire write happened");
    check(n_chain_wire > 0, "register + wire chained into FU happened");
    check(n_multi > 0,      "multi-cycle transfer happened");
    check(n_local > 0,      "local register operand happened");
    check(n_ignored > 0,    "start while busy happened");
    check(n_b2b > 0,        "back-to-back runs happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
