// rdr_island_fsm: distributed controller of one RDR island.
//
// Every island has its own FSM. All of them share the same state transition
// diagram - idle, then one state per control step, then back to idle - and
// differ only in the control word each state issues to its own island. The
// per-island output table is the PROG parameter, produced by scheduling and
// binding for the application. Since all islands see the same start pulse and
// run the same transitions, they stay in lock step without any wires between
// the controllers.
//
// Timing: start is sampled in S_IDLE; control step s (s = 0..NSTEPS-1) is
// active in the (s+1)-th cycle after that edge, with ctrl = PROG[s]. done
// pulses for one cycle in the cycle after the last step, when the last step's
// results are in registers. Thus done rises NSTEPS cycles after the edge that
// took start. start is ignored while busy. Outside S_RUN, ctrl is CTRL_NOP.
// The explicit step counter and the start/done/busy handshake are this
// design's choices.
module rdr_island_fsm
  import rdr_pkg::*;
#(
  parameter int unsigned           NSTEPS = 7,
  parameter ctrl_t [NSTEPS-1:0]    PROG   = '0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output ctrl_t                        ctrl,
  output logic [$clog2(NSTEPS+1)-1:0]  step,
  output logic                         busy,
  output logic                         done
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          step <= '0;
          if (start) state <= S_RUN;
        end
        S_RUN: begin
          if (32'(step) == NSTEPS - 1) begin
            state <= S_IDLE;
            step  <= '0;
            done  <= 1'b1;
          end else begin
            step <= step + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_RUN);

  always_comb begin
    ctrl = CTRL_NOP;
    if (state == S_RUN && 32'(step) < NSTEPS) ctrl = PROG[step];
  end

endmodule
