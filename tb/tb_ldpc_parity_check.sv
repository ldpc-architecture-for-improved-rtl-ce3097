// tb_ldpc_parity_check: exhaustive test of the syndrome unit on the 3 x 6
// example matrix. For all 64 hard-decision words the expected syndrome is
// worked out from the matrix written row by row as integers, and the number
// of codewords (words with zero syndrome) is checked to be 2**(6-3) = 8,
// since the three rows are independent.
module tb_ldpc_parity_check;
  localparam int M = 3, N = 6;
  // Rows as written; index 0 of each row is its leftmost entry.
  localparam bit [0:N-1] HROWS [M] = '{6'b111100, 6'b001101, 6'b100110};

  logic [N-1:0] r;
  logic [M-1:0] syndrome;
  logic         result_decode;

  ldpc_parity_check dut (.*);

  int checks = 0, failures = 0, codewords = 0;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      logic [M-1:0] exp_s;
      r = N'(v);
      #1;
      for (int m = 0; m < M; m++) begin
        int s;
        s = 0;
        for (int n = 0; n < N; n++) s += int'(HROWS[m][n]) * ((v >> n) & 1);
        exp_s[m] = 1'(s % 2);
      end
      checks++;
      if (syndrome !== exp_s || result_decode !== (exp_s == 0)) begin
        failures++;
        $display("FAIL r=%b syndrome %b expected %b", r, syndrome, exp_s);
      end
      if (exp_s == 0) codewords++;
    end
    checks++;
    if (codewords != 8) begin
      failures++;
      $display("FAIL %0d codewords", codewords);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
