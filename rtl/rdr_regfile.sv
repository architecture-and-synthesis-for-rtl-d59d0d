// rdr_regfile: banked local register file of one RDR island.
//
// The registers of an island are split into NBANKS banks. Bank j holds the
// registers that drive j-cycle communication paths: once written, such a
// register must keep its value for j clock cycles so that a receiver at the
// far end of a j-cycle global wire sees a stable value (the multi-cycle path
// rule that the physical design is later constrained with). Bank 1 also serves
// ordinary single-cycle local storage.
//
// This file enforces the rule in hardware: every register carries a small hold
// counter loaded with j-1 when it is written. A write to a register whose
// counter is still non-zero is a hold violation: the write is still performed,
// and the sticky hold_err output is set until reset. The banks-by-latency
// organisation follows the architecture; the counter check, NREGS and the
// single write port are this design's choices.
//
// Interface: one synchronous write port (we, wbank in 1..NBANKS, widx,
// wdata) and all registers readable in parallel through q[bank-1][idx], so the
// island's operand and link multiplexers can pick any of them. A write with an
// out-of-range bank or index is ignored and raises hold_err as well. Reset
// (asynchronous, active low) clears all registers and counters.
module rdr_regfile
  import rdr_pkg::*;
#(
  parameter int unsigned W      = DATA_W,
  parameter int unsigned NBANKS = MAX_BANKS,  // up to 7-cycle paths
  parameter int unsigned NREGS  = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic [2:0]          wbank,
  input  logic [2:0]          widx,
  input  logic signed [W-1:0] wdata,
  output logic signed [W-1:0] q [NBANKS][NREGS],
  output logic                hold_err
);

  logic [2:0] hold [NBANKS][NREGS];
  logic       wr_hit;        // (wbank, widx) names an existing register
  logic       wr_busy;       // ... whose hold time has not yet run out
  logic       wr_ok;
  logic       wr_violation;

  always_comb begin
    wr_hit  = 1'b0;
    wr_busy = 1'b0;
    for (int b = 0; b < NBANKS; b++)
      for (int r = 0; r < NREGS; r++)
        if (32'(wbank) == b + 1 && 32'(widx) == r) begin
          wr_hit  = 1'b1;
          wr_busy = (hold[b][r] != 3'd0);
        end
    wr_ok        = we && wr_hit;
    wr_violation = we && (!wr_hit || wr_busy);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANKS; b++) begin
        for (int r = 0; r < NREGS; r++) begin
          q[b][r]    <= '0;
          hold[b][r] <= '0;
        end
      end
      hold_err <= 1'b0;
    end else begin
      for (int b = 0; b < NBANKS; b++) begin
        for (int r = 0; r < NREGS; r++) begin
          if (wr_ok && (32'(wbank) == b + 1) && (32'(widx) == r)) begin
            q[b][r]    <= wdata;
            hold[b][r] <= 3'(b);  // bank b+1: hold for b more cycles
          end else if (hold[b][r] != 3'd0) begin
            hold[b][r] <= hold[b][r] - 3'd1;
          end
        end
      end
      if (wr_violation) hold_err <= 1'b1;
    end
  end

endmodule
