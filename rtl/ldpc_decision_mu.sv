// ldpc_decision_mu: decision memory unit, the decoder's output register.
//
// When the controller ends a frame (capture high for one cycle) the unit
// stores the hard decisions of all columns, the parity-check result and the
// number of iterations used, and raises out_valid for the next cycle only.
// The stored word stays on dec_out until the next capture, so a consumer
// may read it at any time after out_valid. A reset clears everything.
// Only the block's name and its place between the decisions and the output
// come from the architecture; this behaviour is this design's choice.
module ldpc_decision_mu #(
  parameter int unsigned N  = 6,
  parameter int unsigned IW = 6    // iteration count width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          capture,        // end of a frame
  input  logic [N-1:0]  r_in,           // hard decisions
  input  logic          ok_in,          // all parity checks hold
  input  logic [IW-1:0] iter_in,        // iterations used
  output logic [N-1:0]  dec_out,
  output logic          result_decode,
  output logic [IW-1:0] iter_count,
  output logic          out_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      dec_out       <= '0;
      result_decode <= 1'b0;
      iter_count    <= '0;
      out_valid     <= 1'b0;
    end else begin
      out_valid <= capture;
      if (capture) begin
        dec_out       <= r_in;
        result_decode <= ok_in;
        iter_count    <= iter_in;
      end
    end
  end

endmodule
