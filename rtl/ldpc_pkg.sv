// ldpc_pkg: types and constants shared by the Split-Row threshold min-sum
// LDPC decoder.
//
// H_EXAMPLE is the 3 x 6 irregular parity-check matrix used as the decoder's
// default code. Row m is stored as an N-bit vector whose bit n is column n,
// column 0 being the leftmost column of the matrix as written:
//   row 0 : 1 1 1 1 0 0
//   row 1 : 0 0 1 1 0 1
//   row 2 : 1 0 0 1 1 0
// The controller state type is also kept here so testbenches can name states.
package ldpc_pkg;

  localparam int unsigned M_EXAMPLE = 3;
  localparam int unsigned N_EXAMPLE = 6;

  // {row 2, row 1, row 0}; bit n of each row is column n.
  localparam logic [M_EXAMPLE-1:0][N_EXAMPLE-1:0] H_EXAMPLE =
    {6'b011001, 6'b101100, 6'b001111};

  // Controller states.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,   // waiting for start
    ST_ROW   = 2'd1,   // one row of H per cycle through the check node units
    ST_CHECK = 2'd2    // parity check of the new hard decisions
  } ctrl_state_t;

endpackage
