// rdr_array: an array of RDR islands joined by a global interconnect.
//
// The array holds NISL islands (rdr_island). Each island has NPORT links;
// every link carries a register-driven net and an FU-driven net in each
// direction (see rdr_pkg). The global interconnect is a set of point-to-point
// wires given by the LINK_ISL/LINK_PORT tables: the input side of link p of
// island i is driven by the output side of link LINK_PORT[i][p] of island
// LINK_ISL[i][p] (8-bit entries); an island number of NISL or more leaves the
// link unconnected (reads 0). The
// tables can describe neighbour links as well as long wires that pass over
// other islands, such as a 2-cycle wire between two islands that are not
// adjacent. How many cycles a wire needs is not visible in the netlist: it is
// honoured by the island programs, which read a j-cycle wire only from a
// bank-j register that has been held for j cycles, and it becomes a
// multi-cycle path constraint for physical design.
//
// Each island's unit mix (HAS_ALU/HAS_MUL/HAS_DIV bit i) and program
// (PROG[i]) are parameters; all islands share W, FRAC, NBANKS, NREGS, NPORT,
// NEXT and NSTEPS. All controllers receive the same start and run identical
// state sequences, which an assertion checks. The defaults are the 2x2 DCT
// example of rdr_dct_pkg.
//
// Interface: start (broadcast), ext[i] primary inputs of island i, rf_q[i]
// registers of island i, busy/done of island 0 (all islands agree), hold_err
// and bad_op ORed over all islands. Timing is that of rdr_island_fsm: done
// pulses NSTEPS cycles after the start edge.
module rdr_array
  import rdr_pkg::*;
  import rdr_dct_pkg::*;
#(
  parameter int unsigned W       = DATA_W,
  parameter int unsigned FRAC    = FRAC_W,
  parameter int unsigned NISL    = N_ISL,
  parameter int unsigned NBANKS  = N_BANKS,
  parameter int unsigned NREGS   = N_REGS,
  parameter int unsigned NPORT   = N_PORT,
  parameter int unsigned NEXT    = N_EXT,
  parameter int unsigned NSTEPS  = N_STEPS,
  parameter bit [NISL-1:0] HAS_ALU = ARRAY_HAS_ALU,
  parameter bit [NISL-1:0] HAS_MUL = ARRAY_HAS_MUL,
  parameter bit [NISL-1:0] HAS_DIV = ARRAY_HAS_DIV,
  parameter ctrl_t [NISL-1:0][NSTEPS-1:0] PROG = ARRAY_PROG,
  parameter logic [NISL-1:0][NPORT-1:0][7:0] LINK_ISL  = ARRAY_LINK_ISL,
  parameter logic [NISL-1:0][NPORT-1:0][7:0] LINK_PORT = ARRAY_LINK_PORT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] ext  [NISL][NEXT],
  output logic signed [W-1:0] rf_q [NISL][NBANKS][NREGS],
  output logic                busy,
  output logic                done,
  output logic                hold_err,
  output logic                bad_op
);

  logic signed [W-1:0] xr_in  [NISL][NPORT];
  logic signed [W-1:0] xf_in  [NISL][NPORT];
  logic signed [W-1:0] xr_out [NISL][NPORT];
  logic signed [W-1:0] xf_out [NISL][NPORT];
  logic [NISL-1:0]     isl_busy, isl_done, isl_herr, isl_bad;

  for (genvar i = 0; i < NISL; i++) begin : g_isl
    rdr_island #(
      .W(W), .FRAC(FRAC), .HAS_ALU(HAS_ALU[i]), .HAS_MUL(HAS_MUL[i]), .HAS_DIV(HAS_DIV[i]),
      .NBANKS(NBANKS), .NREGS(NREGS), .NPORT(NPORT), .NEXT(NEXT), .NSTEPS(NSTEPS),
      .PROG(PROG[i])
    ) u_isl (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (start),
      .ext      (ext[i]),
      .xr_in    (xr_in[i]),
      .xf_in    (xf_in[i]),
      .xr_out   (xr_out[i]),
      .xf_out   (xf_out[i]),
      .rf_q     (rf_q[i]),
      .busy     (isl_busy[i]),
      .done     (isl_done[i]),
      .hold_err (isl_herr[i]),
      .bad_op   (isl_bad[i])
    );

    // Global interconnect: point-to-point wires from the link tables.
    for (genvar p = 0; p < NPORT; p++) begin : g_link
      localparam int unsigned SRC_I = 32'(LINK_ISL[i][p]);
      localparam int unsigned SRC_P = 32'(LINK_PORT[i][p]);
      if (SRC_I < NISL && SRC_P < NPORT) begin : g_wire
        assign xr_in[i][p] = xr_out[SRC_I][SRC_P];
        assign xf_in[i][p] = xf_out[SRC_I][SRC_P];
      end else begin : g_open
        assign xr_in[i][p] = '0;
        assign xf_in[i][p] = '0;
      end
    end
  end

  assign busy     = isl_busy[0];
  assign done     = isl_done[0];
  assign hold_err = |isl_herr;
  assign bad_op   = |isl_bad;

  // The distributed controllers share one transition diagram, one start and
  // one reset, so they must agree at every cycle (reset included).
  a_lock_step: assert property (@(posedge clk)
      isl_busy == {NISL{isl_busy[0]}} && isl_done == {NISL{isl_done[0]}})
    else $error("island controllers out of step");

endmodule
