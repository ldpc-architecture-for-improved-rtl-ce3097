// tb_ldpc_decision_mu: self-checking test of the output register. Checks
// that a capture stores word, flag and count, that out_valid is a
// one-cycle pulse in the cycle after capture, that the word holds while
// new inputs arrive without capture, and that reset clears it.
module tb_ldpc_decision_mu;
  localparam int N = 6, IW = 6;

  logic          clk = 0, rst, capture, ok_in, result_decode, out_valid;
  logic [N-1:0]  r_in, dec_out;
  logic [IW-1:0] iter_in, iter_count;

  ldpc_decision_mu #(.N(N), .IW(IW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic expect_out(logic [N-1:0] d, logic ok, logic [IW-1:0] it, logic v);
    checks++;
    if (dec_out !== d || result_decode !== ok || iter_count !== it || out_valid !== v) begin
      failures++;
      $display("FAIL t=%0t dec %b/%b ok %b/%b it %0d/%0d valid %b/%b", $time,
               dec_out, d, result_decode, ok, iter_count, it, out_valid, v);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] d; logic ok; logic [IW-1:0] it;
    rst = 1; capture = 0; r_in = 0; ok_in = 0; iter_in = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    expect_out('0, 0, '0, 0);
    for (int k = 0; k < 200; k++) begin
      d = N'($urandom); ok = 1'($urandom); it = IW'($urandom);
      r_in = d; ok_in = ok; iter_in = it; capture = 1;
      @(negedge clk);
      expect_out(d, ok, it, 1);
      capture = 0;
      r_in = ~d; ok_in = ~ok; iter_in = ~it;
      repeat ($urandom_range(1, 3)) begin
        @(negedge clk);
        expect_out(d, ok, it, 0);
      end
    end
    rst = 1;
    @(negedge clk);
    expect_out('0, 0, '0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
