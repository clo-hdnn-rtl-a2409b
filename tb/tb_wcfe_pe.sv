// tb_wcfe_pe: checks one WCFE processing element. Random activations are
// merged into random centroid buckets, then multiplied by random centroid
// weights; the result is compared with a model that keeps its own buckets
// and applies reference BF16 rounding in the same order. A second run checks
// that clr empties the buckets.
module tb_wcfe_pe;
  import bf16_ref_pkg::*;
  localparam int K = 16;
  logic clk = 0, rst_n = 0, clr = 0, merge_en = 0, mac_en = 0;
  logic [15:0] act = 0, w = 0, y;
  logic [3:0] idx = 0, mac_k = 0;
  int checks = 0, failures = 0;
  logic [15:0] mb [K];
  logic [15:0] macc;

  wcfe_pe #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk); rst_n <= 1;
    for (int run = 0; run < 20; run++) begin
      clr <= 1; @(posedge clk); clr <= 0;
      for (int k = 0; k < K; k++) mb[k] = 16'd0;
      macc = 16'd0;
      for (int i = 0; i < 40; i++) begin
        act <= bf_rand(118, 130);
        idx <= 4'($urandom);
        merge_en <= 1;
        #1;
        mb[idx] = bf_add(mb[idx], act);
        @(posedge clk);
      end
      merge_en <= 0;
      for (int k = 0; k < K; k++) begin
        w <= bf_rand(120, 128);
        mac_k <= 4'(k);
        mac_en <= 1;
        #1;
        macc = bf_add(macc, bf_mul(mb[k], w));
        @(posedge clk);
      end
      mac_en <= 0;
      @(posedge clk);
      checks++;
      if (y !== macc) begin
        failures++;
        $display("FAIL run %0d y=%h exp=%h", run, y, macc);
      end
    end
    // clr with no merges: result must be zero
    clr <= 1; @(posedge clk); clr <= 0;
    for (int k = 0; k < K; k++) begin
      w <= 16'h3F80; mac_k <= 4'(k); mac_en <= 1; @(posedge clk);
    end
    mac_en <= 0; @(posedge clk);
    checks++;
    if (y !== 16'd0) begin failures++; $display("FAIL clr y=%h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
