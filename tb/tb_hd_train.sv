// tb_hd_train: checks the CHV training update. A memory model holds class
// segments with elements near the INT8 limits; random query segments are
// bundled into random (label, segment) words and the written word must equal
// the old word plus the bipolar query, saturated to [-128, 127]. Words of
// other addresses must stay unchanged and done must follow start by 2 cycles.
module tb_hd_train;
  localparam int NC = 128, MS = 128;
  logic clk = 0, rst_n = 0, start = 0, chv_we, done;
  logic [63:0] qseg = 0;
  logic [6:0] seg = 0;
  logic [6:0] label = 0;
  logic [13:0] chv_raddr, chv_waddr;
  logic [511:0] chv_rdata, chv_wdata;
  int checks = 0, failures = 0, sats = 0;
  logic [511:0] mem [NC*MS];
  logic [511:0] ref_mem [NC*MS];

  hd_train dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    chv_rdata <= mem[chv_raddr];
    if (chv_we) mem[chv_waddr] <= chv_wdata;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NC*MS; i++)
      for (int k = 0; k < 64; k++) begin
        int v;
        v = $urandom_range(0, 3) == 0 ? ($urandom_range(0, 1) ? 127 : -128) : int'($urandom_range(0, 255)) - 128;
        mem[i][8*k +: 8] = 8'(v);
      end
    ref_mem = mem;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int a, cyc;
      qseg = {$urandom, $urandom}; label = 7'($urandom_range(0, 5)); seg = 7'($urandom_range(0, 3));
      a = int'(label) * MS + int'(seg);
      for (int k = 0; k < 64; k++) begin
        int v;
        v = int'($signed(ref_mem[a][8*k +: 8])) + (qseg[k] ? 1 : -1);
        if (v > 127) begin v = 127; sats++; end
        if (v < -128) begin v = -128; sats++; end
        ref_mem[a][8*k +: 8] = 8'(v);
      end
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (cyc != 2) begin failures++; $display("FAIL latency %0d", cyc); end
      if (mem[a] !== ref_mem[a]) begin failures++; $display("FAIL word %0d", a); end
    end
    for (int i = 0; i < 8*MS; i++) begin
      checks++;
      if (mem[i] !== ref_mem[i]) begin failures++; $display("FAIL final word %0d", i); end
    end
    checks++;
    if (sats == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
