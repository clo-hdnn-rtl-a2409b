// tb_sync_fifo: random pushes and pops against a queue model; checks the
// head word, full and empty, and fills the FIFO to full and drains it.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  logic [33:0] wdata = 0, rdata;
  int checks = 0, failures = 0, fulls = 0;
  logic [33:0] q [$];

  sync_fifo #(.W(34), .DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks += 2;
      if (empty != (q.size() == 0)) begin failures++; $display("FAIL empty"); end
      if (full != (q.size() == 16)) begin failures++; $display("FAIL full"); end
      if (full) fulls++;
      if (!empty) begin
        checks++;
        if (rdata !== q[0]) begin failures++; $display("FAIL data"); end
      end
      push = !full && ($urandom_range(0, 99) < ((i / 300) % 2 ? 30 : 70));
      pop  = !empty && ($urandom_range(0, 99) < ((i / 300) % 2 ? 70 : 30));
      wdata = {2'($urandom), $urandom};
      if (push) q.push_back(wdata);
      if (pop) void'(q.pop_front());
    end
    @(negedge clk); push = 0; pop = 0;
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
