// ldpc_cnu: control node unit, the variable-node processor of one code bit.
//
// Each column n of H has one of these units. It keeps the channel LLR L(n)
// of its bit, the posterior P(n) of the last iteration and an accumulator.
// While the controller walks the rows of H, one per cycle:
//   * beta = sat(P(n) - alpha_old) is the variable-to-check message for the
//     current row, where alpha_old is the message that row sent last
//     iteration (read from the column's memory unit; taken as 0 in the first
//     iteration);
//   * the row's new message alpha_new, from the check node unit, is added to
//     the accumulator, which starts each iteration at L(n);
//   * on the last row (iter_end) the sum becomes the new posterior P(n).
// The hard decision r = sign(P(n)) (1 for a negative posterior, i.e. BPSK
// with bit 0 sent as +1) goes to the parity check.
//
// Interface and timing: load takes llr_in at the clock edge and starts a
// frame. row_en marks a cycle in which a row is processed and row_active
// says whether this column has a 1 in that row; other rows leave the unit
// alone. beta and r are combinational from the registers. PW, the
// posterior width, is wide enough that the sum never overflows. The flooding
// order of the updates, the sign convention and the widths are this design's
// choices; the unit's role of giving r to the parity check follows the
// architecture's description of the control node units.
module ldpc_cnu #(
  parameter int unsigned W  = 8,                    // message width
  parameter int unsigned M  = 3,                    // rows of H
  localparam int unsigned PW = W + $clog2(M + 1)    // posterior width
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,        // take llr_in, start a frame
  input  logic signed [W-1:0]  llr_in,      // channel LLR of this bit
  input  logic                 row_en,      // a row is processed this cycle
  input  logic                 row_active,  // this column is in that row
  input  logic                 first_iter,  // no old messages yet
  input  logic                 iter_end,    // last row of the iteration
  input  logic signed [W-1:0]  alpha_old,   // this row's message, last iteration
  input  logic signed [W-1:0]  alpha_new,   // this row's message, now
  output logic signed [W-1:0]  beta,        // variable-to-check message
  output logic signed [PW-1:0] post,        // posterior P(n)
  output logic                 r            // hard decision
);

  localparam logic signed [PW:0] MAXV = (PW + 1)'(2 ** (W - 1) - 1);
  localparam logic signed [PW:0] MINV = -MAXV;

  logic signed [W-1:0]  llr_q;
  logic signed [PW-1:0] acc;
  logic signed [PW-1:0] acc_next;
  logic signed [PW:0]   diff;

  always_comb begin
    diff = (PW + 1)'(post) - (first_iter ? '0 : (PW + 1)'(alpha_old));
    if (diff > MAXV)      beta = W'(MAXV);
    else if (diff < MINV) beta = W'(MINV);
    else                  beta = W'(diff);
    acc_next = acc + (row_active ? PW'(alpha_new) : '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      llr_q <= '0;
      post  <= '0;
      acc   <= '0;
    end else if (load) begin
      llr_q <= llr_in;
      post  <= PW'(llr_in);
      acc   <= PW'(llr_in);
    end else if (row_en) begin
      if (iter_end) begin
        post <= acc_next;
        acc  <= PW'(llr_q);
      end else begin
        acc  <= acc_next;
      end
    end
  end

  assign r = post[PW-1];

endmodule
