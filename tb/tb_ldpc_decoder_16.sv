// tb_ldpc_decoder_16: the decoder with 16 column units, a rate-1/2 code of
// length 16, at 8-bit and at 16-bit message width.
//
// The 8 x 16 parity-check matrix below is a test matrix made for this
// bench: irregular (column weights 2 and 3), full rank (256 codewords),
// split into two partitions of 8 columns. Two decoders, one with W = 8 and
// one with W = 16, receive the same BPSK/AWGN frames (LLR step 1/4,
// saturated to each width) at Eb/N0 from 1 to 7 dB. Each result is checked
// against the reference model, including the latency k*(M+1)+1, and the
// bench counts early stops, iteration-limit stops, corrected frames and
// threshold events for both decoders and fails if one never happened.
module tb_ldpc_decoder_16;
  import ldpc_ref_pkg::*;

  localparam int M = 8, N = 16, SPLIT = 2, MAX_ITER = 50, IW = 6;
  localparam int FRAMES_PER_POINT = 150;
  // Bit n of each row is column n.
  localparam logic [M-1:0][N-1:0] H16 =
    {16'b1010000000011000, 16'b0001010011110000, 16'b0000101000000001,
     16'b1000000000000110, 16'b0000010100001011, 16'b0001100100001100,
     16'b0100000011100101, 16'b0110001000000010};
  // The same matrix written row by row, leftmost entry = column 0.
  localparam bit [0:N-1] HROWS [M] = '{
    16'b0100000001000110, 16'b1010011100000010, 16'b0011000010011000,
    16'b1101000010100000, 16'b0110000000000001, 16'b1000000001010000,
    16'b0000111100101000, 16'b0001100000000101};

  logic clk = 0, rst, start;
  logic [14:0] threshold;

  logic signed [7:0]  llr8  [N];
  logic signed [15:0] llr16 [N];
  logic               busy8, busy16, v8, v16, ok8, ok16;
  logic [N-1:0]       dec8, dec16;
  logic [IW-1:0]      it8, it16;

  ldpc_decoder #(.M(M), .N(N), .H(H16), .SPLIT(SPLIT), .W(8)) u_w8 (
    .clk, .rst, .start, .llr_in (llr8), .threshold (threshold[6:0]), .busy (busy8),
    .out_valid (v8), .dec_out (dec8), .result_decode (ok8), .iter_count (it8));

  ldpc_decoder #(.M(M), .N(N), .H(H16), .SPLIT(SPLIT), .W(16)) u_w16 (
    .clk, .rst, .start, .llr_in (llr16), .threshold, .busy (busy16),
    .out_valid (v16), .dec_out (dec16), .result_decode (ok16), .iter_count (it16));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_early [2], n_limit [2], n_corr [2], n_thr [2], n_both [2];

  always @(posedge clk) if (!rst) begin
    if (u_w8.row_en) begin
      if (u_w8.g_part[0].u_chnu.thr_en_out || u_w8.g_part[1].u_chnu.thr_en_out) n_thr[0]++;
      if ((!u_w8.g_part[0].u_chnu.thr_en_out && u_w8.g_part[0].u_chnu.thr_en_in) ||
          (!u_w8.g_part[1].u_chnu.thr_en_out && u_w8.g_part[1].u_chnu.thr_en_in)) n_both[0]++;
    end
    if (u_w16.row_en) begin
      if (u_w16.g_part[0].u_chnu.thr_en_out || u_w16.g_part[1].u_chnu.thr_en_out) n_thr[1]++;
      if ((!u_w16.g_part[0].u_chnu.thr_en_out && u_w16.g_part[0].u_chnu.thr_en_in) ||
          (!u_w16.g_part[1].u_chnu.thr_en_out && u_w16.g_part[1].u_chnu.thr_en_in)) n_both[1]++;
    end
  end

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h[];
    bit codewords [$][];
    h = new[M * N];
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) h[m*N+n] = HROWS[m][n];
    // Both forms of the matrix must agree.
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) begin
      checks++;
      if (H16[m][n] != HROWS[m][n]) begin failures++; $display("FAIL matrix forms differ"); end
    end
    for (int v = 0; v < (1 << N); v++) begin
      bit c[];
      c = new[N];
      for (int n = 0; n < N; n++) c[n] = bit'((v >> n) & 1);
      if (syndrome_weight(h, M, N, c) == 0) codewords.push_back(c);
    end
    $display("%0d codewords", codewords.size());
    foreach (n_early[i]) begin n_early[i] = 0; n_limit[i] = 0; n_corr[i] = 0; n_thr[i] = 0; n_both[i] = 0; end

    rst = 1; start = 0; threshold = 15'd8;
    foreach (llr8[n]) begin llr8[n] = '0; llr16[n] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;

    for (int snr_db = 1; snr_db <= 7; snr_db++) begin
      real ebn0, sigma;
      automatic int raw_err = 0;
      automatic int dec_err [2] = '{0, 0};
      ebn0 = 10.0 ** (real'(snr_db) / 10.0);
      sigma = $sqrt(1.0 / (2.0 * 0.5 * ebn0));
      for (int f = 0; f < FRAMES_PER_POINT; f++) begin
        bit c[];
        int l8[], l16[], t;
        int cyc [2], ref_it [2];
        bit ref_dec [2][];
        bit ref_ok [2];
        bit done [2];
        c = codewords[$urandom_range(0, codewords.size() - 1)];
        l8 = new[N]; l16 = new[N];
        for (int n = 0; n < N; n++) begin
          real y, l;
          y = (c[n] ? -1.0 : 1.0) + sigma * gauss();
          l = 4.0 * 2.0 * y / (sigma * sigma);
          l8[n]  = (l > 127.0) ? 127 : (l < -127.0) ? -127 : int'(l);
          l16[n] = (l > 32767.0) ? 32767 : (l < -32767.0) ? -32767 : int'(l);
          raw_err += ((l < 0.0) != c[n]);
        end
        t = $urandom_range(2, 24);
        ref_it[0] = decode(h, M, N, SPLIT, l8, t, 3, 2, 8, MAX_ITER, ref_dec[0], ref_ok[0]);
        ref_it[1] = decode(h, M, N, SPLIT, l16, t, 3, 2, 16, MAX_ITER, ref_dec[1], ref_ok[1]);

        threshold = 15'(t);
        for (int n = 0; n < N; n++) begin llr8[n] = 8'(l8[n]); llr16[n] = 16'(l16[n]); end
        start = 1;
        @(negedge clk);
        start = 0;
        cyc = '{1, 1}; done = '{0, 0};
        while (!(done[0] && done[1])) begin
          @(negedge clk);
          for (int k = 0; k < 2; k++) if (!done[k]) cyc[k]++;
          if (v8)  done[0] = 1;
          if (v16) done[1] = 1;
        end
        for (int k = 0; k < 2; k++) begin
          logic [N-1:0] d; logic ok; int it;
          automatic bit same = 1;
          automatic bit any_raw = 0;
          automatic bit any_dec = 0;
          d  = (k == 0) ? dec8 : dec16;
          ok = (k == 0) ? ok8 : ok16;
          it = int'((k == 0) ? it8 : it16);
          for (int n = 0; n < N; n++) begin
            if (d[n] != ref_dec[k][n]) same = 0;
            if (d[n] != c[n]) begin dec_err[k]++; any_dec = 1; end
            if (((k == 0 ? l8[n] : l16[n]) < 0) != c[n]) any_raw = 1;
          end
          if (any_raw && !any_dec) n_corr[k]++;
          if (ok && it < MAX_ITER) n_early[k]++;
          if (!ok && it == MAX_ITER) n_limit[k]++;
          checks++;
          if (!same || ok != ref_ok[k] || it != ref_it[k] || cyc[k] != ref_it[k] * (M + 1) + 1) begin
            failures++;
            $display("FAIL W=%0d frame %0d at %0d dB: dec %b ok %b it %0d cycles %0d; expected ok %b it %0d",
                     k ? 16 : 8, f, snr_db, d, ok, it, cyc[k], ref_ok[k], ref_it[k]);
          end
        end
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      $display("Eb/N0 %0d dB: channel BER %f | decoder BER W=8 %f, W=16 %f",
               snr_db, real'(raw_err) / (N * FRAMES_PER_POINT),
               real'(dec_err[0]) / (N * FRAMES_PER_POINT), real'(dec_err[1]) / (N * FRAMES_PER_POINT));
    end

    for (int k = 0; k < 2; k++) begin
      $display("W=%0d: early_stop=%0d iteration_limit=%0d corrected=%0d thr_flag=%0d both_to_T=%0d",
               k ? 16 : 8, n_early[k], n_limit[k], n_corr[k], n_thr[k], n_both[k]);
      checks++;
      if (n_early[k] == 0 || n_limit[k] == 0 || n_corr[k] == 0 || n_thr[k] == 0 || n_both[k] == 0) begin
        failures++;
        $display("FAIL a mechanism never occurred for W=%0d", k ? 16 : 8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
