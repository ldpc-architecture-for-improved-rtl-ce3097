// tb_ldpc_cnu: self-checking test of the control node unit (one column).
//
// Loads a random channel LLR, then runs several iterations of three rows
// with random row membership and random old and new check messages. Before
// each edge it checks beta = sat(P - alpha_old) (alpha_old taken as 0 in the
// first iteration); after each iteration it checks that the posterior is the
// channel LLR plus the new messages of the rows the column belongs to, and
// that r is the posterior's sign. Large messages drive beta into
// saturation. Watchdog included.
module tb_ldpc_cnu;
  localparam int W = 8, M = 3, PW = W + 2;

  logic                 clk = 0, rst, load, row_en, row_active, first_iter, iter_end, r;
  logic signed [W-1:0]  llr_in, alpha_old, alpha_new, beta;
  logic signed [PW-1:0] post;

  ldpc_cnu #(.W(W), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;

  function automatic int sat(int v);
    return (v > 127) ? 127 : (v < -127) ? -127 : v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l, p, acc;
    rst = 1; load = 0; row_en = 0; row_active = 0; first_iter = 0; iter_end = 0;
    llr_in = 0; alpha_old = 0; alpha_new = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int frame = 0; frame < 100; frame++) begin
      l = $urandom_range(0, 254) - 127;
      llr_in = W'(l); load = 1;
      @(negedge clk);
      load = 0;
      p = l;
      checks++;
      if (int'(post) != p) begin failures++; $display("FAIL load post %0d exp %0d", post, p); end
      for (int it = 0; it < 4; it++) begin
        acc = l;
        for (int m = 0; m < M; m++) begin
          int exp_beta;
          row_en = 1; first_iter = (it == 0); iter_end = (m == M - 1);
          row_active = 1'($urandom);
          alpha_old = W'($urandom_range(0, 254) - 127);
          alpha_new = W'($urandom_range(0, 254) - 127);
          #1;
          exp_beta = sat(p - ((it == 0) ? 0 : int'(alpha_old)));
          if (exp_beta == 127 || exp_beta == -127) n_sat++;
          checks++;
          if (int'(beta) != exp_beta) begin
            failures++;
            $display("FAIL beta %0d exp %0d (P %0d old %0d)", beta, exp_beta, p, alpha_old);
          end
          if (row_active) acc += int'(alpha_new);
          @(negedge clk);
        end
        row_en = 0; iter_end = 0;
        // Idle cycle: nothing may change.
        row_active = 1; alpha_new = 8'sd100;
        @(negedge clk);
        p = acc;
        checks++;
        if (int'(post) != p || r != (p < 0)) begin
          failures++;
          $display("FAIL post %0d exp %0d r %b", post, p, r);
        end
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
