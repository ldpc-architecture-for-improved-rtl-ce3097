// tb_ldpc_decoder: end-to-end test of the decoder at its default parameters
// (3 x 6 example code, two partitions, 8-bit messages, up to 50 iterations).
//
// Frames are random codewords sent with BPSK (bit 0 -> +1) over an additive
// white Gaussian noise channel at Eb/N0 from 0 to 7 dB, code rate 1/2. The
// received samples become LLRs 2y/sigma^2 in steps of 1/4, saturated to
// 8 bits. Every frame is checked against the reference model: decoded
// bits, parity result, iteration count, and the latency of k*(M+1)+1
// cycles from start to out_valid. The threshold T is changed between frames.
// The test counts how often each mechanism occurs and fails if one never
// does: a partition flagging Min1 < T, both minima replaced by T, Min2
// replaced by T, a sign received from the other partition, an early stop on
// a passing parity check, a stop at the iteration limit, and a frame whose
// channel errors were corrected. Bit and frame error rates per Eb/N0 are
// printed, for the channel's hard decisions and for the decoder.
module tb_ldpc_decoder;
  import ldpc_ref_pkg::*;

  localparam int M = 3, N = 6, W = 8, MAX_ITER = 50, SPLIT = 2;
  localparam int IW = 6;
  localparam int FRAMES_PER_POINT = 400;

  logic                clk = 0, rst, start, busy, out_valid, result_decode;
  logic signed [W-1:0] llr_in [N];
  logic [W-2:0]        threshold;
  logic [N-1:0]        dec_out;
  logic [IW-1:0]       iter_count;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_thr_flag = 0, n_both_t = 0, n_min2_t = 0, n_sign_x = 0;
  int n_early = 0, n_limit = 0, n_corrected = 0;

  // Matrix rows as written, leftmost entry = column 0.
  localparam bit [0:N-1] HROWS [M] = '{6'b111100, 6'b001101, 6'b100110};
  bit h[];
  bit codewords [$][];

  // Mechanism counters, sampled while a row is processed.
  always @(posedge clk) if (!rst && dut.row_en) begin
    if (dut.g_part[0].u_chnu.thr_en_out || dut.g_part[1].u_chnu.thr_en_out) n_thr_flag++;
    if (dut.g_part[0].u_chnu.sign_in || dut.g_part[1].u_chnu.sign_in) n_sign_x++;
    if ((dut.g_part[0].u_chnu.mask != 0 && !dut.g_part[0].u_chnu.thr_en_out &&
         dut.g_part[0].u_chnu.thr_en_in) ||
        (dut.g_part[1].u_chnu.mask != 0 && !dut.g_part[1].u_chnu.thr_en_out &&
         dut.g_part[1].u_chnu.thr_en_in)) n_both_t++;
    if ((dut.g_part[0].u_chnu.thr_en_out && dut.g_part[0].u_chnu.thr_en_in &&
         dut.g_part[0].u_chnu.min2 >= threshold) ||
        (dut.g_part[1].u_chnu.thr_en_out && dut.g_part[1].u_chnu.thr_en_in &&
         dut.g_part[1].u_chnu.min2 >= threshold)) n_min2_t++;
  end

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h = new[M * N];
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) h[m*N+n] = HROWS[m][n];
    for (int v = 0; v < (1 << N); v++) begin
      bit c[];
      c = new[N];
      for (int n = 0; n < N; n++) c[n] = bit'((v >> n) & 1);
      if (syndrome_weight(h, M, N, c) == 0) codewords.push_back(c);
    end
    $display("%0d codewords", codewords.size());

    rst = 1; start = 0; threshold = 7'd8;
    foreach (llr_in[n]) llr_in[n] = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    for (int snr_db = 0; snr_db <= 7; snr_db++) begin
      real ebn0, sigma;
      automatic int raw_bit_err = 0, dec_bit_err = 0, raw_frame_err = 0, dec_frame_err = 0;
      automatic int iter_sum = 0;
      ebn0 = 10.0 ** (real'(snr_db) / 10.0);
      sigma = $sqrt(1.0 / (2.0 * 0.5 * ebn0));
      for (int f = 0; f < FRAMES_PER_POINT; f++) begin
        bit c[], ref_dec[];
        bit ref_ok;
        int llr[];
        int ref_it, cycles, raw_err, dec_err, t;
        c = codewords[$urandom_range(0, codewords.size() - 1)];
        llr = new[N];
        for (int n = 0; n < N; n++) begin
          real y, l;
          y = (c[n] ? -1.0 : 1.0) + sigma * gauss();
          l = 4.0 * 2.0 * y / (sigma * sigma);
          llr[n] = (l > 127.0) ? 127 : (l < -127.0) ? -127 : int'(l);
        end
        t = $urandom_range(2, 24);
        ref_it = decode(h, M, N, SPLIT, llr, t, 3, 2, W, MAX_ITER, ref_dec, ref_ok);

        threshold = 7'(t);
        for (int n = 0; n < N; n++) llr_in[n] = W'(llr[n]);
        start = 1;
        @(negedge clk);
        start = 0;
        cycles = 1;
        while (!out_valid) begin
          @(negedge clk);
          cycles++;
        end

        raw_err = 0; dec_err = 0;
        for (int n = 0; n < N; n++) begin
          if ((llr[n] < 0) != c[n]) raw_err++;
          if (dec_out[n] != c[n]) dec_err++;
        end
        raw_bit_err += raw_err; dec_bit_err += dec_err;
        raw_frame_err += (raw_err != 0); dec_frame_err += (dec_err != 0);
        iter_sum += int'(iter_count);
        if (raw_err != 0 && dec_err == 0) n_corrected++;
        if (result_decode && int'(iter_count) < MAX_ITER) n_early++;
        if (!result_decode && int'(iter_count) == MAX_ITER) n_limit++;

        checks++;
        begin
          automatic bit same = 1;
          for (int n = 0; n < N; n++) if (dec_out[n] != ref_dec[n]) same = 0;
          if (!same || result_decode != ref_ok || int'(iter_count) != ref_it ||
              cycles != ref_it * (M + 1) + 1) begin
            failures++;
            $display("FAIL frame %0d at %0d dB: dec %b ok %b it %0d cycles %0d; expected ok %b it %0d",
                     f, snr_db, dec_out, result_decode, iter_count, cycles, ref_ok, ref_it);
          end
        end
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      $display("Eb/N0 %0d dB: channel BER %f FER %f | decoder BER %f FER %f | mean iterations %f",
               snr_db, real'(raw_bit_err) / (N * FRAMES_PER_POINT),
               real'(raw_frame_err) / FRAMES_PER_POINT,
               real'(dec_bit_err) / (N * FRAMES_PER_POINT),
               real'(dec_frame_err) / FRAMES_PER_POINT,
               real'(iter_sum) / FRAMES_PER_POINT);
    end

    $display("mechanisms: thr_flag=%0d both_to_T=%0d min2_to_T=%0d sign_exchange=%0d early_stop=%0d iteration_limit=%0d corrected=%0d",
             n_thr_flag, n_both_t, n_min2_t, n_sign_x, n_early, n_limit, n_corrected);
    if (n_thr_flag == 0) begin failures++; $display("FAIL no threshold flag"); end
    if (n_both_t == 0)   begin failures++; $display("FAIL minima never replaced by T"); end
    if (n_min2_t == 0)   begin failures++; $display("FAIL Min2 never replaced by T"); end
    if (n_sign_x == 0)   begin failures++; $display("FAIL no sign exchange"); end
    if (n_early == 0)    begin failures++; $display("FAIL no early stop"); end
    if (n_limit == 0)    begin failures++; $display("FAIL iteration limit never reached"); end
    if (n_corrected == 0) begin failures++; $display("FAIL no channel error corrected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
