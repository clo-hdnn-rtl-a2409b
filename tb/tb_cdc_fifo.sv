// tb_cdc_fifo: a writer at one clock and a reader at an unrelated clock
// (7 ns and 17 ns periods, then swapped roles of speed) move 3000 words
// through the dual-clock FIFO; every word must arrive once, in order, and
// the FIFO must have been seen full.
module tb_cdc_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic push = 0, pop = 0, full, empty;
  logic [36:0] wdata = 0, rdata;
  int checks = 0, failures = 0, fulls = 0, received = 0;
  localparam int N = 3000;
  int wper = 7, rper = 17;

  cdc_fifo #(.W(37), .DEPTH(16)) dut (.*);
  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge wclk);
    wrst_n = 1; rrst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge wclk);
      while (full) begin fulls++; @(negedge wclk); end
      push = 1; wdata = 37'(i) * 37'd977;
      @(negedge wclk); push = 0;
      if (i == N/2) begin wper = 19; rper = 5; end
    end
  end

  initial begin
    repeat (5) @(negedge rclk);
    while (received < N) begin
      @(negedge rclk);
      if (!empty && $urandom_range(0, 3) != 0) begin
        checks++;
        if (rdata !== 37'(received) * 37'd977) begin failures++; $display("FAIL word %0d", received); end
        received++;
        pop = 1; @(negedge rclk); pop = 0;
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
