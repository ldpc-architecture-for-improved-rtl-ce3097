// ldpc_mu: memory unit of one column of the parity-check matrix.
//
// Holds the check-to-variable message (alpha) that each row of H last sent
// to this column, one word per row, so the column's control node unit can
// remove a row's own old contribution when it forms that row's next
// variable-to-check message. One memory unit sits beside each column unit.
//
// Interface and timing: an asynchronous read port (rdata follows raddr in the
// same cycle) and a synchronous write port (written on the rising edge when
// we is high). Reading and writing the same row in one cycle returns the old
// word, which is what the decoder needs: it reads a row's old message and
// writes the new one in the same cycle. The contents are not reset; the
// decoder never reads a row before its first write in a frame. The width,
// the depth of one word per row and the read-before-write timing are this
// design's choices.
module ldpc_mu #(
  parameter int unsigned DEPTH = 3,   // rows of H
  parameter int unsigned W     = 8,   // message width
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic [AW-1:0]       raddr,
  output logic signed [W-1:0] rdata,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic signed [W-1:0] wdata
);

  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
