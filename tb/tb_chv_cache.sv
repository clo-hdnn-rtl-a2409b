// tb_chv_cache: checks the CHV memory. Random full-word and single-part
// (masked) writes are applied to random addresses and read back one cycle
// after the address, against a model array.
module tb_chv_cache;
  localparam int DEPTH = 128 * 32;
  logic clk = 0, we = 0;
  logic [13:0] raddr = 0, waddr = 0;
  logic [511:0] rdata, wdata = 0;
  logic [15:0] wmask = 0;
  int checks = 0, failures = 0;
  logic [511:0] model [int];

  chv_cache dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int addrs [64];
    for (int i = 0; i < 64; i++) begin
      addrs[i] = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      we = 1; waddr = 14'(addrs[i]); wmask = 16'hFFFF;
      for (int k = 0; k < 16; k++) wdata[32*k +: 32] = $urandom;
      model[addrs[i]] = wdata;
    end
    for (int i = 0; i < 200; i++) begin
      int a, part;
      a = addrs[$urandom_range(0, 63)]; part = $urandom_range(0, 15);
      @(negedge clk);
      we = 1; waddr = 14'(a); wmask = 16'(1 << part);
      for (int k = 0; k < 16; k++) wdata[32*k +: 32] = $urandom;
      model[a][32*part +: 32] = wdata[32*part +: 32];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) begin
      raddr = 14'(addrs[i]);
      @(negedge clk);
      checks++;
      if (rdata !== model[addrs[i]]) begin failures++; $display("FAIL addr %0d", addrs[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
