// rdr_island: one island of the regular distributed register (RDR) array.
//
// An island is sized so that a value read from one of its registers can pass
// through one of its functional units and be written back to one of its
// registers within a single clock cycle. It contains
//   * a local computational cluster (rdr_lcc): ALU, multiplier and/or divider,
//   * a banked register file (rdr_regfile), bank j driving j-cycle paths,
//   * its own controller (rdr_island_fsm) running the island's program PROG,
//   * the operand, write-data and link-driver multiplexers steered by the
//     controller (the steering logic of the island).
// All islands of a design run identical FSM state sequences; only PROG differs.
//
// Links: the island has NPORT links to neighbouring islands. Each link carries
// two nets in each direction (see rdr_pkg): a register-driven net (xr_out,
// driven by a local register chosen per step, or 0) and an FU-driven net
// (xf_out, the current FU result, or 0). Register-driven nets arriving here
// (xr_in) can be FU operands or be copied into a register; FU-driven nets
// (xf_in) can only be written into a register. A multi-cycle transfer is a
// register in bank j driving xr_out for the j cycles of the path; the
// receiving island reads it in the last of them.
//
// Primary inputs: NEXT words (ext) that the island's operands may select.
// Timing: everything between registers is combinational; one control step per
// clock cycle. rf_q exposes all registers so that a top level can take its
// results from them. busy/done come from the island FSM; hold_err is the
// register file's sticky hold-violation flag, bad_op a sticky flag for an
// operation on a unit the cluster lacks.
module rdr_island
  import rdr_pkg::*;
#(
  parameter int unsigned        W       = DATA_W,
  parameter int unsigned        FRAC    = FRAC_W,
  parameter bit                 HAS_ALU = 1'b1,
  parameter bit                 HAS_MUL = 1'b1,
  parameter bit                 HAS_DIV = 1'b0,
  parameter int unsigned        NBANKS  = 2,
  parameter int unsigned        NREGS   = 2,
  parameter int unsigned        NPORT   = MAX_PORTS,
  parameter int unsigned        NEXT    = 3,
  parameter int unsigned        NSTEPS  = 7,
  parameter ctrl_t [NSTEPS-1:0] PROG    = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] ext    [NEXT],
  input  logic signed [W-1:0] xr_in  [NPORT],
  input  logic signed [W-1:0] xf_in  [NPORT],
  output logic signed [W-1:0] xr_out [NPORT],
  output logic signed [W-1:0] xf_out [NPORT],
  output logic signed [W-1:0] rf_q   [NBANKS][NREGS],
  output logic                busy,
  output logic                done,
  output logic                hold_err,
  output logic                bad_op
);

  ctrl_t               ctrl;
  logic signed [W-1:0] opa, opb, fu_y, wdata;
  logic                lcc_bad, bad_q;
  logic                rf_err;

  rdr_island_fsm #(.NSTEPS(NSTEPS), .PROG(PROG)) u_fsm (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .ctrl  (ctrl),
    .step  (),
    .busy  (busy),
    .done  (done)
  );

  // Register read: bank numbers are 1-based; anything out of range reads 0.
  function automatic logic signed [W-1:0] rf_read(input logic [2:0] bank,
                                                  input logic [2:0] idx);
    rf_read = '0;
    for (int b = 0; b < NBANKS; b++)
      for (int r = 0; r < NREGS; r++)
        if (32'(bank) == b + 1 && 32'(idx) == r) rf_read = rf_q[b][r];
  endfunction

  function automatic logic signed [W-1:0] operand(input src_t s);
    operand = '0;
    unique case (s.kind)
      SRC_REG:  operand = rf_read(s.bank, s.idx);
      SRC_WIRE: for (int p = 0; p < NPORT; p++) if (32'(s.idx) == p) operand = xr_in[p];
      SRC_EXT:  for (int e = 0; e < NEXT; e++)  if (32'(s.idx) == e) operand = ext[e];
      default:  operand = '0;
    endcase
  endfunction

  always_comb begin
    opa = operand(ctrl.a);
    opb = operand(ctrl.b);
  end

  rdr_lcc #(.W(W), .FRAC(FRAC), .HAS_ALU(HAS_ALU), .HAS_MUL(HAS_MUL), .HAS_DIV(HAS_DIV)) u_lcc (
    .op     (ctrl.op),
    .a      (opa),
    .b      (opb),
    .y      (fu_y),
    .bad_op (lcc_bad)
  );

  // Write-data steering: local FU, or a net arriving on a link.
  always_comb begin
    wdata = fu_y;
    unique case (ctrl.wr.src)
      WS_WFU:  for (int p = 0; p < NPORT; p++) if (32'(ctrl.wr.port) == p) wdata = xf_in[p];
      WS_WREG: for (int p = 0; p < NPORT; p++) if (32'(ctrl.wr.port) == p) wdata = xr_in[p];
      default: wdata = fu_y;
    endcase
  end

  rdr_regfile #(.W(W), .NBANKS(NBANKS), .NREGS(NREGS)) u_rf (
    .clk      (clk),
    .rst_n    (rst_n),
    .we       (ctrl.wr.we),
    .wbank    (ctrl.wr.bank),
    .widx     (ctrl.wr.idx),
    .wdata    (wdata),
    .q        (rf_q),
    .hold_err (rf_err)
  );

  // Link drivers.
  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      xr_out[p] = ctrl.xo_reg[p].en ? rf_read(ctrl.xo_reg[p].bank, ctrl.xo_reg[p].idx) : '0;
      xf_out[p] = ctrl.xo_fu[p] ? fu_y : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       bad_q <= 1'b0;
    else if (lcc_bad) bad_q <= 1'b1;
  end

  assign bad_op   = bad_q;
  assign hold_err = rf_err;

endmodule
