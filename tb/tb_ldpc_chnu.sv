// tb_ldpc_chnu: self-checking test of one Split-Row check node unit.
//
// Drives random and directed message vectors, masks, thresholds and
// neighbour signals into an NP = 4 unit and compares alpha, sign_out and
// thr_en_out with the reference model. Directed cases cover each threshold
// rule: local Min1 below T, Min2 replaced by T, both minima replaced by T
// when a neighbour flags, and the plain local minima. A watchdog ends the
// run if it hangs.
module tb_ldpc_chnu;
  import ldpc_ref_pkg::*;

  localparam int NP = 4, W = 8, S_NUM = 3, S_SHIFT = 2;

  logic [NP-1:0]       mask;
  logic signed [W-1:0] beta [NP];
  logic [W-2:0]        threshold;
  logic                sign_in, thr_en_in, sign_out, thr_en_out;
  logic signed [W-1:0] alpha [NP];

  ldpc_chnu #(.NP(NP), .W(W), .S_NUM(S_NUM), .S_SHIFT(S_SHIFT)) dut (.*);

  int checks = 0, failures = 0;
  int n_local = 0, n_min2_t = 0, n_both_t = 0, n_plain = 0;

  task automatic check_now();
    int b[]; bit mk[]; int a[]; bit so, to;
    b = new[NP]; mk = new[NP];
    for (int i = 0; i < NP; i++) begin
      b[i] = int'(beta[i]);
      mk[i] = mask[i];
    end
    #1;
    chnu(b, mk, int'(threshold), sign_in, thr_en_in, S_NUM, S_SHIFT, W, a, so, to);
    checks++;
    if (sign_out !== so || thr_en_out !== to) begin
      failures++;
      $display("FAIL flags: sign %0b/%0b thr %0b/%0b", sign_out, so, thr_en_out, to);
    end
    for (int i = 0; i < NP; i++) begin
      checks++;
      if (int'(alpha[i]) != a[i]) begin
        failures++;
        $display("FAIL alpha[%0d]=%0d expected %0d (beta %0d mask %b T %0d)",
                 i, alpha[i], a[i], b[i], mask, threshold);
      end
    end
    // Which threshold rule applied.
    begin
      int m1 = 1000, m2 = 1000;
      foreach (b[i]) if (mk[i]) begin
        int mg = (b[i] < 0) ? -b[i] : b[i];
        if (mg > 127) mg = 127;
        if (mg < m1) begin m2 = m1; m1 = mg; end else if (mg < m2) m2 = mg;
      end
      if (mask != 0) begin
        if (m1 < threshold && thr_en_in && m2 >= threshold) n_min2_t++;
        else if (m1 < threshold) n_local++;
        else if (thr_en_in) n_both_t++;
        else n_plain++;
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Hand-worked case: betas +10, -3, +20, -40, all in the row, T = 8.
    // Min1 = 3 (column 1), Min2 = 10; signs: two negatives, so local XOR 0.
    // With sign_in = 1 the row sign is 1. alpha = 0.75 * {3, 10, 3, 3}
    // floored = {2, 7, 2, 2}, sign = row sign ^ own sign:
    // col0 (+): -2, col1 (-): +7, col2 (+): -2, col3 (-): +2.
    mask = 4'b1111; threshold = 7'd8; sign_in = 1; thr_en_in = 0;
    beta[0] = 8'sd10; beta[1] = -8'sd3; beta[2] = 8'sd20; beta[3] = -8'sd40;
    #1;
    checks++;
    if (!(alpha[0] == -2 && alpha[1] == 7 && alpha[2] == -2 && alpha[3] == 2 &&
          sign_out == 0 && thr_en_out == 1)) begin
      failures++;
      $display("FAIL hand case: %0d %0d %0d %0d s%0b t%0b",
               alpha[0], alpha[1], alpha[2], alpha[3], sign_out, thr_en_out);
    end
    // Neighbour below T, local Min1 = 30 >= T = 8: both minima become 8,
    // 0.75 * 8 = 6 on every column.
    beta[0] = 8'sd30; beta[1] = 8'sd50; beta[2] = -8'sd60; beta[3] = 8'sd31;
    thr_en_in = 1; sign_in = 0;
    #1;
    checks++;
    if (!(alpha[0] == -6 && alpha[1] == -6 && alpha[2] == 6 && alpha[3] == -6 &&
          thr_en_out == 0 && sign_out == 1)) begin
      failures++;
      $display("FAIL neighbour case: %0d %0d %0d %0d", alpha[0], alpha[1], alpha[2], alpha[3]);
    end
    check_now();
    // Most negative input saturates.
    beta[0] = -8'sd128; beta[1] = 8'sd100; beta[2] = 8'sd90; beta[3] = 8'sd127;
    thr_en_in = 0; mask = 4'b0011;
    check_now();
    // Random vectors, with small magnitudes often so all rules occur.
    for (int k = 0; k < 4000; k++) begin
      for (int i = 0; i < NP; i++)
        beta[i] = ($urandom_range(0, 1) != 0) ? W'($urandom) : W'($signed($urandom_range(0, 24)) - 12);
      mask      = NP'($urandom);
      threshold = 7'($urandom_range(0, 20));
      sign_in   = 1'($urandom);
      thr_en_in = 1'($urandom);
      check_now();
    end
    $display("threshold rules seen: local=%0d min2_to_T=%0d both_to_T=%0d plain=%0d",
             n_local, n_min2_t, n_both_t, n_plain);
    if (n_local == 0 || n_min2_t == 0 || n_both_t == 0 || n_plain == 0) begin
      failures++;
      $display("FAIL a threshold rule never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
