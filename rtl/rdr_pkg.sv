// rdr_pkg: shared types and constants of the regular distributed register (RDR)
// island architecture.
//
// An RDR design is a 2-D array of islands. Each island holds a local
// computational cluster (LCC), a banked local register file and its own FSM
// controller. The FSM of every island steps through the same control-step
// sequence; only the control word it issues per step differs from island to
// island. This package defines that control word (ctrl_t) and the helpers
// used to write per-island programs.
//
// Bank j of a register file holds registers that drive j-cycle paths: a value
// written there must stay unchanged for j clock cycles. Banks are numbered
// 1..NBANKS as in the architecture description; the 3-bit field allows up to
// 7 banks, the number of cycles needed to cross the 12x12-island, 70 nm die
// used as the architecture's sizing example.
//
// Inter-island links are split into two nets per direction:
//   * a register-driven net (xo_reg): a local register drives the global wire;
//     the receiving island may feed it to its FU or copy it into a register.
//   * an FU-driven net (xo_fu): the FU result of the current cycle travels over
//     a short wire and is written into a register of the receiving island in
//     the same cycle (a short wire merged with a short operation).
// An FU-driven net can only end in a register, never in another FU, so no
// combinational path crosses more than one island boundary.
//
// Data width and fixed-point format are this design's choice (16-bit two's
// complement, Q2.14 coefficients).
package rdr_pkg;

  localparam int unsigned DATA_W    = 16;  // datapath word width
  localparam int unsigned FRAC_W    = 14;  // fraction bits of multiplier coefficients
  localparam int unsigned MAX_BANKS = 7;   // bank field range 1..7
  localparam int unsigned MAX_REGS  = 8;   // register index field range 0..7
  localparam int unsigned MAX_PORTS = 4;   // neighbour links per island (N/E/S/W)

  // Operation of the local computational cluster in one control step.
  typedef enum logic [2:0] {
    FU_NOP = 3'd0,
    FU_ADD = 3'd1,
    FU_SUB = 3'd2,
    FU_MUL = 3'd3,
    FU_DIV = 3'd4
  } fu_op_e;

  // Where an FU operand comes from.
  typedef enum logic [1:0] {
    SRC_ZERO = 2'd0,  // constant 0
    SRC_REG  = 2'd1,  // local register (bank, idx)
    SRC_WIRE = 2'd2,  // register-driven net arriving on link idx
    SRC_EXT  = 2'd3   // primary input idx of this island
  } src_kind_e;

  typedef struct packed {
    src_kind_e  kind;
    logic [2:0] bank;
    logic [2:0] idx;
  } src_t;

  // Where a register-file write takes its data from.
  typedef enum logic [1:0] {
    WS_FU   = 2'd0,  // local FU result
    WS_WFU  = 2'd1,  // FU-driven net arriving on link port
    WS_WREG = 2'd2   // register-driven net arriving on link port
  } wsrc_e;

  typedef struct packed {
    logic       we;
    wsrc_e      src;
    logic [1:0] port;
    logic [2:0] bank;
    logic [2:0] idx;
  } wr_t;

  // Driver of the register-driven net of one outgoing link.
  typedef struct packed {
    logic       en;
    logic [2:0] bank;
    logic [2:0] idx;
  } xreg_t;

  // Control word issued by an island FSM in one control step.
  typedef struct packed {
    fu_op_e                      op;
    src_t                        a;
    src_t                        b;
    wr_t                         wr;
    xreg_t [MAX_PORTS-1:0]       xo_reg;
    logic  [MAX_PORTS-1:0]       xo_fu;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '0;

  // ---- helpers for writing control programs --------------------------------
  function automatic src_t s_reg(input int unsigned bank, input int unsigned idx);
    s_reg = '{kind: SRC_REG, bank: 3'(bank), idx: 3'(idx)};
  endfunction

  function automatic src_t s_wire(input int unsigned port);
    s_wire = '{kind: SRC_WIRE, bank: 3'd0, idx: 3'(port)};
  endfunction

  function automatic src_t s_ext(input int unsigned idx);
    s_ext = '{kind: SRC_EXT, bank: 3'd0, idx: 3'(idx)};
  endfunction

  function automatic wr_t w_fu(input int unsigned bank, input int unsigned idx);
    w_fu = '{we: 1'b1, src: WS_FU, port: 2'd0, bank: 3'(bank), idx: 3'(idx)};
  endfunction

  function automatic wr_t w_wfu(input int unsigned port, input int unsigned bank,
                                input int unsigned idx);
    w_wfu = '{we: 1'b1, src: WS_WFU, port: 2'(port), bank: 3'(bank), idx: 3'(idx)};
  endfunction

  function automatic xreg_t x_reg(input int unsigned bank, input int unsigned idx);
    x_reg = '{en: 1'b1, bank: 3'(bank), idx: 3'(idx)};
  endfunction

endpackage
