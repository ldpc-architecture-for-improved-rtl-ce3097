// tb_ldpc_mu: self-checking test of the per-column message memory.
//
// Writes random words to random rows, reads back through the asynchronous
// port against a shadow copy, and checks that a read of the row being
// written in the same cycle returns the old word. Watchdog included.
module tb_ldpc_mu;
  localparam int DEPTH = 5, W = 8, AW = 3;

  logic                clk = 0;
  logic [AW-1:0]       raddr, waddr;
  logic signed [W-1:0] rdata, wdata;
  logic                we;

  ldpc_mu #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [W-1:0] shadow [DEPTH];
  bit written [DEPTH];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    // Fill every row.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = W'($urandom);
      shadow[a] = wdata; written[a] = 1;
    end
    @(negedge clk);
    we = 0;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      raddr = AW'($urandom_range(0, DEPTH - 1));
      we = 1'($urandom);
      waddr = ($urandom_range(0, 1) != 0) ? raddr : AW'($urandom_range(0, DEPTH - 1));
      wdata = W'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin
        failures++;
        $display("FAIL row %0d read %0d expected %0d", raddr, rdata, shadow[raddr]);
      end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
