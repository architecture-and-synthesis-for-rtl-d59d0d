// rdr_dct_top: a 2x2-island regular distributed register (RDR) datapath that
// evaluates the 12-node DCT data flow graph of rdr_dct_pkg in 7 clock cycles.
//
// Problem: when global wires need more than one clock cycle, a classic
// datapath with a central register file must stretch its clock to the longest
// wire. Here every island has its own registers and controller; an island
// computes within one cycle, and a transfer between islands is either chained
// with a short operation in one cycle or is a multi-cycle path from a register
// that holds its value for as many cycles as the path needs. With 1 ns/2 ns
// operations and 1 ns/2 ns wires this keeps the 2 ns clock, and the graph
// finishes in 7 cycles (14 ns).
//
// Floorplan (link 0 = horizontal, 1 ns; link 1 = vertical, 2 ns):
//      TL: MUL2 (3,7,11)  ---  TR: ALU1 (1,5,10)
//            |                       |
//      BL: ALU2 (2,6,9)   ---  BR: MUL1 (4,8,12)
// The islands, their programs (PROG_* of rdr_dct_pkg) and the wires between
// them form an rdr_array; this top adds input capture and the result taps.
//
// Interface and timing: start (one cycle, ignored while busy) captures x and c
// into input registers; the islands run steps 1..7 in the next 7 cycles; done
// pulses in the cycle after step 7 (7 cycles after the start edge), with y0
// (node 9) and y1 (node 10) valid from then until the next start. hold_err
// and bad_op are sticky error flags (a register overwritten within its hold
// time; an operation on a unit an island lacks); neither can occur with the
// built-in programs. Data width, fixed-point format, the external operand of
// each node and the handshake are this design's choices; the graph, the
// binding, the placement and the schedule are those of the example.
module rdr_dct_top
  import rdr_pkg::*;
  import rdr_dct_pkg::*;
#(
  parameter int unsigned W    = DATA_W,
  parameter int unsigned FRAC = FRAC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] x [N_X],
  input  logic signed [W-1:0] c [N_C],
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] y0,
  output logic signed [W-1:0] y1,
  output logic                hold_err,
  output logic                bad_op
);

  logic signed [W-1:0] x_q [N_X];
  logic signed [W-1:0] c_q [N_C];
  logic signed [W-1:0] ext  [N_ISL][N_EXT];
  logic signed [W-1:0] rf_q [N_ISL][N_BANKS][N_REGS];

  // Input capture on an accepted start.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_X; i++) x_q[i] <= '0;
      for (int i = 0; i < N_C; i++) c_q[i] <= '0;
    end else if (start && !busy) begin
      x_q <= x;
      c_q <= c;
    end
  end

  // Primary inputs of each island.
  always_comb begin
    ext[TL] = '{c_q[0], c_q[2], c_q[4]};
    ext[TR] = '{x_q[0], x_q[1], x_q[4]};
    ext[BL] = '{x_q[2], x_q[3], x_q[5]};
    ext[BR] = '{c_q[1], c_q[3], c_q[5]};
  end

  rdr_array #(
    .W(W), .FRAC(FRAC), .NISL(N_ISL), .NBANKS(N_BANKS), .NREGS(N_REGS), .NPORT(N_PORT),
    .NEXT(N_EXT), .NSTEPS(N_STEPS), .HAS_ALU(ARRAY_HAS_ALU), .HAS_MUL(ARRAY_HAS_MUL),
    .HAS_DIV(ARRAY_HAS_DIV), .PROG(ARRAY_PROG), .LINK_ISL(ARRAY_LINK_ISL),
    .LINK_PORT(ARRAY_LINK_PORT)
  ) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .ext      (ext),
    .rf_q     (rf_q),
    .busy     (busy),
    .done     (done),
    .hold_err (hold_err),
    .bad_op   (bad_op)
  );

  assign y0 = rf_q[BL][0][0];  // n9: ALU2, bank 1, register 0
  assign y1 = rf_q[TR][0][0];  // n10: ALU1, bank 1, register 0

endmodule
