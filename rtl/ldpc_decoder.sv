// ldpc_decoder: partially parallel Split-Row threshold min-sum LDPC decoder.
//
// The decoder corrects a received block of N soft bits (channel LLRs) with
// the low-density parity-check code whose M x N matrix is H. It runs
// normalized min-sum belief propagation, with the check node work of each
// row split into SPLIT column partitions (Split-Row): each partition finds
// its minima from its own columns only, and the partitions exchange just one
// sign bit and one threshold bit (Split-Row threshold method).
//
// Structure:
//   * per column n: a control node unit (ldpc_cnu) holding L(n) and the
//     posterior P(n), and a memory unit (ldpc_mu) holding the message each
//     row last sent to column n;
//   * per partition p: one check node unit (ldpc_chnu), shared by all rows,
//     so one iteration takes M cycles plus one for the parity check;
//   * the row of H being processed selects which columns take part (the
//     routing from the columns to the partitions is fixed by the split, the
//     row mask is read from H);
//   * a parity check (ldpc_parity_check) of the hard decisions after every
//     iteration, which stops decoding early when H r^T = 0;
//   * a decision memory unit (ldpc_decision_mu) that presents the result;
//   * a controller (ldpc_ctrl).
//
// Interface and timing: hold llr_in (W-bit two's complement, positive means
// bit 0) and raise start for one cycle while busy is low. After k iterations
// (1 <= k <= MAX_ITER) out_valid is high for one cycle, k*(M+1) + 1 cycles
// after the start cycle; dec_out, result_decode (all checks hold) and
// iter_count then stay until the next frame ends. threshold is the
// split-row threshold T as a magnitude in LLR units; it is an input so that
// a channel estimate can set it.
//
// From the architecture: partial parallelism with units shared over rows,
// per-column memory, Split-Row partitions exchanging a sign and a threshold
// flag, the parity check and the name result_decode. This design's choices:
// the default code is the 3 x 6 example matrix (no larger matrix is given),
// SPLIT = 2 as in the two-partition picture of the method, 8-bit messages,
// scaling factor 3/4, 50 iterations at most, and the flooding schedule.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned M        = ldpc_pkg::M_EXAMPLE,
  parameter int unsigned N        = ldpc_pkg::N_EXAMPLE,
  parameter logic [M-1:0][N-1:0] H = ldpc_pkg::H_EXAMPLE,
  parameter int unsigned SPLIT    = 2,    // partitions of each row
  parameter int unsigned W        = 8,    // message width
  parameter int unsigned S_NUM    = 3,    // scaling factor numerator
  parameter int unsigned S_SHIFT  = 2,    // scaling factor = S_NUM / 2**S_SHIFT
  parameter int unsigned MAX_ITER = 50,
  localparam int unsigned IW = $clog2(MAX_ITER + 1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic signed [W-1:0] llr_in [N],   // channel LLRs, index n = column n
  input  logic [W-2:0]        threshold,    // split-row threshold T
  output logic                busy,
  output logic                out_valid,
  output logic [N-1:0]        dec_out,      // decoded bits, bit n = column n
  output logic                result_decode,
  output logic [IW-1:0]       iter_count
);

  localparam int unsigned NP = N / SPLIT;
  localparam int unsigned RW = (M > 1) ? $clog2(M) : 1;

  // Controller.
  logic          load, row_en, first_iter, iter_end, capture, parity_ok;
  logic [RW-1:0] row_idx;
  logic [IW-1:0] iter_done;

  ldpc_ctrl #(.M(M), .MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst, .start, .parity_ok, .busy, .load, .row_en, .row_idx,
    .first_iter, .iter_end, .capture, .iter_done,
    .state ()
  );

  // Row of H being processed.
  logic [N-1:0] row_mask;
  assign row_mask = H[row_idx];

  // Column side: control node units and memory units.
  logic signed [W-1:0]  beta      [N];
  logic signed [W-1:0]  alpha_new [N];
  logic signed [W-1:0]  alpha_old [N];
  logic [N-1:0]         r;

  for (genvar n = 0; n < N; n++) begin : g_col
    ldpc_mu #(.DEPTH(M), .W(W)) u_mu (
      .clk,
      .raddr (row_idx),
      .rdata (alpha_old[n]),
      .we    (row_en && row_mask[n]),
      .waddr (row_idx),
      .wdata (alpha_new[n])
    );
    ldpc_cnu #(.W(W), .M(M)) u_cnu (
      .clk, .rst, .load,
      .llr_in     (llr_in[n]),
      .row_en,
      .row_active (row_mask[n]),
      .first_iter,
      .iter_end,
      .alpha_old  (alpha_old[n]),
      .alpha_new  (alpha_new[n]),
      .beta       (beta[n]),
      .post       (),
      .r          (r[n])
    );
  end

  // Row side: one check node unit per partition.
  logic [SPLIT-1:0] sign_out, thr_en_out;

  for (genvar p = 0; p < SPLIT; p++) begin : g_part
    logic signed [W-1:0] beta_p  [NP];
    logic signed [W-1:0] alpha_p [NP];
    logic [SPLIT-1:0]    others;
    assign others = ~(SPLIT'(1) << p);
    for (genvar i = 0; i < NP; i++) begin : g_map
      assign beta_p[i]          = beta[p*NP + i];
      assign alpha_new[p*NP + i] = alpha_p[i];
    end
    ldpc_chnu #(.NP(NP), .W(W), .S_NUM(S_NUM), .S_SHIFT(S_SHIFT)) u_chnu (
      .mask       (row_mask[p*NP +: NP]),
      .beta       (beta_p),
      .threshold,
      .sign_in    (^(sign_out & others)),
      .thr_en_in  (|(thr_en_out & others)),
      .sign_out   (sign_out[p]),
      .thr_en_out (thr_en_out[p]),
      .alpha      (alpha_p)
    );
  end

  // Parity check and output.
  ldpc_parity_check #(.M(M), .N(N), .H(H)) u_pc (
    .r, .syndrome (), .result_decode (parity_ok)
  );

  ldpc_decision_mu #(.N(N), .IW(IW)) u_dec (
    .clk, .rst, .capture,
    .r_in    (r),
    .ok_in   (parity_ok),
    .iter_in (iter_done),
    .dec_out, .result_decode, .iter_count, .out_valid
  );

  // The split must cover every column.
  if (N % SPLIT != 0) begin : g_bad_split
    $error("N must be a multiple of SPLIT");
  end

endmodule
