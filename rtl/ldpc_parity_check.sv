// ldpc_parity_check: syndrome of the hard decisions.
//
// Computes Z = H x r^T over GF(2): bit m of the syndrome is the XOR of the
// hard decisions r(n) of the columns that have a 1 in row m of H. The word
// r is a valid codeword when every bit of Z is 0, which drives
// result_decode high. Purely combinational: the syndrome is valid in the
// same cycle as r. The test H x V^T = 0 and the name result_decode follow
// the architecture's description; the XOR-tree form is this design's.
module ldpc_parity_check #(
  parameter int unsigned M = 3,
  parameter int unsigned N = 6,
  parameter logic [M-1:0][N-1:0] H = ldpc_pkg::H_EXAMPLE
) (
  input  logic [N-1:0] r,              // hard decisions, bit n = column n
  output logic [M-1:0] syndrome,       // Z
  output logic         result_decode   // Z == 0
);

  always_comb begin
    for (int m = 0; m < M; m++) syndrome[m] = ^(H[m] & r);
  end

  assign result_decode = ~|syndrome;

endmodule
