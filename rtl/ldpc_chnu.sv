// ldpc_chnu: check node unit for one partition of a split row.
//
// Split-Row decoding cuts every row of the parity-check matrix H into SPLIT
// column partitions, and each partition has its own check node unit. For the
// row being processed this unit receives the variable-to-check messages
// (beta) of its NP columns, with a mask telling which of those columns have
// a 1 in the row, and returns the check-to-variable messages (alpha).
//
// How it works, all combinational:
//   * sign: the XOR of the masked beta signs of this partition goes out as
//     sign_out; the XOR of the other partitions' signs comes in as sign_in.
//     The total row sign is their XOR, so the sign result is exact.
//   * magnitude: Min1, Min2 and the column of Min1 are found locally; the
//     magnitudes of the other partitions are never seen.
//   * threshold: if the local Min1 is below the threshold T, Min1 and Min2
//     are used as found, and thr_en_out tells the other partitions that a
//     small minimum exists here. If Min1 is not below T but another partition
//     raised its thr_en (thr_en_in), both minima are replaced by T. When Min1
//     is below T but Min2 is not, and thr_en_in is set, Min2 becomes T.
//     Otherwise the local minima stand.
//   * alpha(n) = S * sign(row without n) * (n is the Min1 column ? Min2 : Min1),
//     with S = S_NUM / 2^S_SHIFT (normalized min-sum). Unmasked columns give 0.
// With SPLIT = 1 (sign_in = 0, thr_en_in = 0) the unit is a plain normalized
// min-sum check node.
//
// The sign XOR, the local Min1/Min2 and the rule for Min1 below T follow the
// Split-Row threshold method; the rules for the other threshold cases, the
// scaling factor value and the widths are this design's choices.
// Ports: beta/alpha are W-bit two's complement; threshold is a W-1 bit
// magnitude. No clock: the result is valid in the cycle the inputs are.
module ldpc_chnu #(
  parameter int unsigned NP      = 3,   // columns in this partition
  parameter int unsigned W       = 8,   // message width (two's complement)
  parameter int unsigned S_NUM   = 3,   // scaling factor numerator
  parameter int unsigned S_SHIFT = 2    // scaling factor = S_NUM / 2**S_SHIFT, at most 1
) (
  input  logic [NP-1:0]         mask,        // columns of this partition in the row
  input  logic signed [W-1:0]   beta  [NP],  // variable-to-check messages
  input  logic [W-2:0]          threshold,   // T, as a magnitude
  input  logic                  sign_in,     // XOR of the other partitions' signs
  input  logic                  thr_en_in,   // another partition has Min1 < T
  output logic                  sign_out,    // XOR of this partition's signs
  output logic                  thr_en_out,  // this partition has Min1 < T
  output logic signed [W-1:0]   alpha [NP]   // check-to-variable messages
);

  localparam int unsigned MW = W - 1;                 // magnitude width
  localparam logic [MW-1:0] MAG_MAX = '1;
  localparam int unsigned IW = (NP > 1) ? $clog2(NP) : 1;

  logic [MW-1:0] mag [NP];
  logic [NP-1:0] sgn;
  logic [MW-1:0] min1, min2, m1, m2;
  logic [IW-1:0] idx1;

  // Magnitudes and signs; the most negative code saturates to MAG_MAX.
  always_comb begin
    for (int i = 0; i < NP; i++) begin
      sgn[i] = mask[i] & beta[i][W-1];
      if (!mask[i])
        mag[i] = MAG_MAX;
      else if (beta[i][W-1])
        mag[i] = (beta[i] == {1'b1, {(W-1){1'b0}}}) ? MAG_MAX : MW'(-beta[i]);
      else
        mag[i] = beta[i][MW-1:0];
    end
  end

  // Local first and second minimum, and where the first one is.
  always_comb begin
    min1 = MAG_MAX;
    min2 = MAG_MAX;
    idx1 = '0;
    for (int i = 0; i < NP; i++) begin
      if (mag[i] < min1) begin
        min2 = min1;
        min1 = mag[i];
        idx1 = IW'(i);
      end else if (mag[i] < min2) begin
        min2 = mag[i];
      end
    end
  end

  // Threshold exchange.
  always_comb begin
    thr_en_out = (min1 < threshold);
    m1 = min1;
    m2 = min2;
    if (thr_en_out) begin
      if (thr_en_in && (min2 >= threshold)) m2 = threshold;
    end else if (thr_en_in) begin
      m1 = threshold;
      m2 = threshold;
    end
  end

  assign sign_out = ^sgn;

  // Output messages.
  logic              row_sign;
  logic [MW-1:0]     sel;
  localparam int unsigned PRW = MW + $clog2(S_NUM + 1);
  logic [PRW-1:0]    prod;   // mag * S_NUM
  logic [MW-1:0]     scaled;
  assign row_sign = sign_out ^ sign_in;

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      sel    = (idx1 == IW'(i)) ? m2 : m1;
      prod   = PRW'(sel) * PRW'(S_NUM);
      scaled = MW'(prod >> S_SHIFT);
      if (!mask[i])
        alpha[i] = '0;
      else if (row_sign ^ sgn[i])
        alpha[i] = -$signed({1'b0, scaled});
      else
        alpha[i] = $signed({1'b0, scaled});
    end
  end

endmodule
