// rdr_dct_pkg: the per-island control programs of the DCT example mapped onto
// a 2x2 RDR array.
//
// The data flow graph has 12 nodes, six additions/subtractions (1,2,5,6,9,10)
// and six multiplications (3,4,7,8,11,12), with edges
//   1->3->5->7->9,  5->11->10,  2->4->6->8->9,  6->12->10.
// Node delays are 1 ns (add/sub) and 2 ns (multiply); the clock is 2 ns.
// Binding and placement (schedule of 7 control steps, 14 ns):
//   island TL: MUL2 (nodes 3, 7, 11)     island TR: ALU1 (nodes 1, 5, 10)
//   island BL: ALU2 (nodes 2, 6, 9)      island BR: MUL1 (nodes 4, 8, 12)
//   step: 1      2      3      4   5       6       7
//   ALU1: n1     -      n5     -   -       -       n10
//   ALU2: n2     -      n6     -   -       -       n9
//   MUL1: -      n4     -      -   n12     n8      -
//   MUL2: -      n3     -      -   n7      n11     -
// Horizontal links (TL-TR, BL-BR) are 1 ns wires, vertical links (TL-BL,
// TR-BR) are 2 ns wires. A 1 ns wire is chained with a 1 ns add/sub in one
// cycle (edges 1->3, 2->4 on the FU-driven net into a register at the far end;
// 3->5, 4->6, 8->9, 11->10 from a register into the far ALU). Every other
// transfer is a 2-cycle path: 1 ns wire + 2 ns multiply (5->7, 5->11, 6->8,
// 6->12) or 2 ns wire + 1 ns add (7->9, 12->10), served from a bank-2 register
// that holds its value over both cycles (n5 and n6 are held one cycle longer,
// until their second reader).
//
// The operand that each node takes from outside the graph is this design's
// choice, as is which of the add/sub nodes subtract:
//   n1 = x0 + x1   n2 = x2 - x3   n5 = n3 + x4   n6 = n4 - x5
//   n3 = n1*c0     n4 = n2*c1     n7 = n5*c2     n8 = n6*c3
//   n11 = n5*c4    n12 = n6*c5    n9 = n7 + n8   n10 = n11 - n12
// Results: y0 = n9 (ALU2 island BL, bank 1 register 0), y1 = n10 (ALU1
// island TR, bank 1 register 0).
package rdr_dct_pkg;
  import rdr_pkg::*;

  localparam int unsigned N_STEPS = 7;   // control steps of the schedule
  localparam int unsigned N_BANKS = 2;   // longest path is 2 cycles
  localparam int unsigned N_REGS  = 2;   // registers per bank
  localparam int unsigned N_PORT  = 2;   // links per island in a 2x2 array
  localparam int unsigned N_EXT   = 3;   // primary inputs per island
  localparam int unsigned N_X     = 6;   // data inputs x0..x5
  localparam int unsigned N_C     = 6;   // coefficients c0..c5

  localparam int unsigned P_H = 0;       // link to the horizontal neighbour
  localparam int unsigned P_V = 1;       // link to the vertical neighbour

  typedef ctrl_t [N_STEPS-1:0] prog_t;

  // TL, MUL2. ext = {c0, c2, c4}.
  function automatic prog_t prog_mul2();
    prog_t p = '0;
    p[0].wr           = w_wfu(P_H, 1, 0);                    // n1 from ALU1 -> r1.0
    p[1].op           = FU_MUL;                              // n3 = n1 * c0
    p[1].a            = s_reg(1, 0);
    p[1].b            = s_ext(0);
    p[1].wr           = w_fu(1, 1);
    p[2].xo_reg[P_H]  = x_reg(1, 1);                         // n3 -> ALU1 (node 5)
    p[4].op           = FU_MUL;                              // n7 = n5 * c2
    p[4].a            = s_wire(P_H);
    p[4].b            = s_ext(1);
    p[4].wr           = w_fu(2, 0);
    p[5].op           = FU_MUL;                              // n11 = n5 * c4
    p[5].a            = s_wire(P_H);
    p[5].b            = s_ext(2);
    p[5].wr           = w_fu(1, 0);
    p[5].xo_reg[P_V]  = x_reg(2, 0);                         // n7 -> ALU2, cycle 1 of 2
    p[6].xo_reg[P_V]  = x_reg(2, 0);                         // n7 -> ALU2, cycle 2 of 2
    p[6].xo_reg[P_H]  = x_reg(1, 0);                         // n11 -> ALU1 (node 10)
    return p;
  endfunction

  // TR, ALU1. ext = {x0, x1, x4}.
  function automatic prog_t prog_alu1();
    prog_t p = '0;
    p[0].op           = FU_ADD;                              // n1 = x0 + x1
    p[0].a            = s_ext(0);
    p[0].b            = s_ext(1);
    p[0].xo_fu[P_H]   = 1'b1;                                // chained onto wire to MUL2
    p[2].op           = FU_ADD;                              // n5 = n3 + x4
    p[2].a            = s_wire(P_H);
    p[2].b            = s_ext(2);
    p[2].wr           = w_fu(2, 0);
    p[3].xo_reg[P_H]  = x_reg(2, 0);                         // n5 -> MUL2 (nodes 7, 11)
    p[4].xo_reg[P_H]  = x_reg(2, 0);
    p[5].xo_reg[P_H]  = x_reg(2, 0);
    p[6].op           = FU_SUB;                              // n10 = n11 - n12
    p[6].a            = s_wire(P_H);
    p[6].b            = s_wire(P_V);
    p[6].wr           = w_fu(1, 0);
    return p;
  endfunction

  // BL, ALU2. ext = {x2, x3, x5}.
  function automatic prog_t prog_alu2();
    prog_t p = '0;
    p[0].op           = FU_SUB;                              // n2 = x2 - x3
    p[0].a            = s_ext(0);
    p[0].b            = s_ext(1);
    p[0].xo_fu[P_H]   = 1'b1;                                // chained onto wire to MUL1
    p[2].op           = FU_SUB;                              // n6 = n4 - x5
    p[2].a            = s_wire(P_H);
    p[2].b            = s_ext(2);
    p[2].wr           = w_fu(2, 0);
    p[3].xo_reg[P_H]  = x_reg(2, 0);                         // n6 -> MUL1 (nodes 12, 8)
    p[4].xo_reg[P_H]  = x_reg(2, 0);
    p[5].xo_reg[P_H]  = x_reg(2, 0);
    p[6].op           = FU_ADD;                              // n9 = n7 + n8
    p[6].a            = s_wire(P_V);
    p[6].b            = s_wire(P_H);
    p[6].wr           = w_fu(1, 0);
    return p;
  endfunction

  // BR, MUL1. ext = {c1, c3, c5}.
  function automatic prog_t prog_mul1();
    prog_t p = '0;
    p[0].wr           = w_wfu(P_H, 1, 0);                    // n2 from ALU2 -> r1.0
    p[1].op           = FU_MUL;                              // n4 = n2 * c1
    p[1].a            = s_reg(1, 0);
    p[1].b            = s_ext(0);
    p[1].wr           = w_fu(1, 1);
    p[2].xo_reg[P_H]  = x_reg(1, 1);                         // n4 -> ALU2 (node 6)
    p[4].op           = FU_MUL;                              // n12 = n6 * c5
    p[4].a            = s_wire(P_H);
    p[4].b            = s_ext(2);
    p[4].wr           = w_fu(2, 0);
    p[5].op           = FU_MUL;                              // n8 = n6 * c3
    p[5].a            = s_wire(P_H);
    p[5].b            = s_ext(1);
    p[5].wr           = w_fu(1, 0);
    p[5].xo_reg[P_V]  = x_reg(2, 0);                         // n12 -> ALU1, cycle 1 of 2
    p[6].xo_reg[P_V]  = x_reg(2, 0);                         // n12 -> ALU1, cycle 2 of 2
    p[6].xo_reg[P_H]  = x_reg(1, 0);                         // n8 -> ALU2 (node 9)
    return p;
  endfunction

  localparam prog_t PROG_MUL2 = prog_mul2();
  localparam prog_t PROG_ALU1 = prog_alu1();
  localparam prog_t PROG_ALU2 = prog_alu2();
  localparam prog_t PROG_MUL1 = prog_mul1();

  // ---- the example as an rdr_array configuration ---------------------------
  localparam int unsigned N_ISL = 4;
  localparam int unsigned TL = 0, TR = 1, BL = 2, BR = 3;   // island numbers

  typedef prog_t [N_ISL-1:0] array_prog_t;

  localparam array_prog_t ARRAY_PROG = {PROG_MUL1, PROG_ALU2, PROG_ALU1, PROG_MUL2};
  localparam bit [N_ISL-1:0] ARRAY_HAS_ALU = 4'b0110;         // TR, BL
  localparam bit [N_ISL-1:0] ARRAY_HAS_MUL = 4'b1001;         // TL, BR
  localparam bit [N_ISL-1:0] ARRAY_HAS_DIV = 4'b0000;

  // Link p of island i is fed by link LINK_PORT[i][p] of island LINK_ISL[i][p].
  // Horizontal pairs TL-TR and BL-BR on link 0, vertical pairs TL-BL and
  // TR-BR on link 1.
  typedef logic [N_ISL-1:0][N_PORT-1:0][7:0] link_tab_t;

  function automatic link_tab_t link_isl();
    link_tab_t t;
    t[TL][P_H] = 8'(TR);  t[TL][P_V] = 8'(BL);
    t[TR][P_H] = 8'(TL);  t[TR][P_V] = 8'(BR);
    t[BL][P_H] = 8'(BR);  t[BL][P_V] = 8'(TL);
    t[BR][P_H] = 8'(BL);  t[BR][P_V] = 8'(TR);
    return t;
  endfunction

  function automatic link_tab_t link_port();
    link_tab_t t;
    for (int i = 0; i < N_ISL; i++) begin
      t[i][P_H] = 8'(P_H);
      t[i][P_V] = 8'(P_V);
    end
    return t;
  endfunction

  localparam link_tab_t ARRAY_LINK_ISL  = link_isl();
  localparam link_tab_t ARRAY_LINK_PORT = link_port();

endpackage
