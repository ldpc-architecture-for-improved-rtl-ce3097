// tb_ldpc_ctrl: self-checking test of the decoder controller with M = 3 and
// MAX_ITER = 5. For frames whose parity check passes after a chosen number
// of iterations k (1..5, or never), it checks the row sequence 0,1,2 with
// iter_end on row 2, first_iter only in the first iteration, a one-cycle
// check state after each iteration, capture exactly k*(M+1) cycles after
// the start cycle with iter_done = k, and that start is ignored while busy.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  localparam int M = 3, MAX_ITER = 5, RW = 2, IW = 3;

  logic          clk = 0, rst, start, parity_ok, busy, load, row_en, first_iter;
  logic          iter_end, capture;
  logic [RW-1:0] row_idx;
  logic [IW-1:0] iter_done;
  ctrl_state_t   state;

  ldpc_ctrl #(.M(M), .MAX_ITER(MAX_ITER)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_early = 0, n_limit = 0;

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; parity_ok = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    expect_true(!busy && state == ST_IDLE, "idle after reset");
    for (int frame = 0; frame < 40; frame++) begin
      int pass_at, cycles;
      pass_at = $urandom_range(1, MAX_ITER + 1);   // MAX_ITER + 1: never passes
      start = 1; parity_ok = 0;
      #1;
      expect_true(load, "load with start");
      @(negedge clk);
      start = 0;
      cycles = 1;
      for (int it = 1; it <= MAX_ITER; it++) begin
        for (int m = 0; m < M; m++) begin
          start = 1;   // ignored while busy
          #1;
          expect_true(row_en && !load && row_idx == RW'(m) && first_iter == (it == 1) &&
                      iter_end == (m == M - 1) && !capture, "row phase");
          @(negedge clk);
          cycles++;
        end
        start = 0;
        parity_ok = (it == pass_at);
        #1;
        expect_true(state == ST_CHECK && !row_en, "check phase");
        if (it == pass_at || it == MAX_ITER) begin
          expect_true(capture && iter_done == IW'(it) && cycles == it * (M + 1),
                      $sformatf("capture after %0d iterations", it));
          if (it == pass_at) n_early++; else n_limit++;
          @(negedge clk);
          parity_ok = 0;
          expect_true(!busy && state == ST_IDLE, "back to idle");
          break;
        end
        expect_true(!capture, "no capture");
        @(negedge clk);
        cycles++;
        parity_ok = 0;
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    expect_true(n_early > 0 && n_limit > 0, "both early stop and iteration limit occurred");
    $display("early stops=%0d iteration-limit stops=%0d", n_early, n_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
