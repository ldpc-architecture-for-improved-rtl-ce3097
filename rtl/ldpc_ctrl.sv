// ldpc_ctrl: controller of the partially parallel decoder.
//
// The check node units are shared by all rows of H, so one iteration takes
// several cycles: the controller presents row 0, 1, ..., M-1 on row_idx, one
// row per cycle (state ST_ROW), then spends one cycle (ST_CHECK) on the
// parity check of the new hard decisions. If every check holds, or MAX_ITER
// iterations are done, it pulses capture and returns to ST_IDLE; otherwise
// it starts the next iteration.
//
// Interface and timing: start is taken in ST_IDLE only, and load is high in
// that same cycle so the column units take the channel LLRs at that edge.
// A frame that stops after k iterations has capture high k*(M+1) cycles
// after the start cycle; iter_done carries k in that cycle. The row-serial
// order and the one-cycle check follow from the architecture's sharing of
// processing units over rows; the states and the early stop are this
// design's choices.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned M        = 3,    // rows of H
  parameter int unsigned MAX_ITER = 50,   // iteration limit
  localparam int unsigned RW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned IW = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          parity_ok,   // all parity checks hold
  output logic          busy,
  output logic          load,        // take the channel LLRs
  output logic          row_en,      // a row is processed this cycle
  output logic [RW-1:0] row_idx,     // that row
  output logic          first_iter,
  output logic          iter_end,    // last row of the iteration
  output logic          capture,     // frame done
  output logic [IW-1:0] iter_done,   // iterations used, valid with capture
  output ctrl_state_t   state
);

  logic [RW-1:0] row_q;
  logic [IW-1:0] iter_q;   // iterations completed before the current one
  logic          last_iter;

  assign busy       = (state != ST_IDLE);
  assign load       = (state == ST_IDLE) && start;
  assign row_en     = (state == ST_ROW);
  assign row_idx    = row_q;
  assign first_iter = (iter_q == '0);
  assign iter_end   = row_en && (row_q == RW'(M - 1));
  assign last_iter  = (iter_q == IW'(MAX_ITER - 1));
  assign capture    = (state == ST_CHECK) && (parity_ok || last_iter);
  assign iter_done  = iter_q + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= ST_IDLE;
      row_q  <= '0;
      iter_q <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          state  <= ST_ROW;
          row_q  <= '0;
          iter_q <= '0;
        end
        ST_ROW: begin
          if (iter_end) begin
            state <= ST_CHECK;
            row_q <= '0;
          end else begin
            row_q <= row_q + 1'b1;
          end
        end
        ST_CHECK: begin
          if (capture) state <= ST_IDLE;
          else begin
            state  <= ST_ROW;
            iter_q <= iter_q + 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The row counter never leaves the matrix.
  a_row_in_range: assert property (@(posedge clk) disable iff (rst)
    row_en |-> (int'(row_idx) < int'(M)));

endmodule
