// tb_wcfe: end-to-end check of the weight clustering feature extractor.
// Random activations, centroid indices and centroid weights are written
// through the host port; after start the 4 x 16 outputs are read back through
// both the host read port and the feature port and compared with a model that
// merges by index and multiplies once per centroid with reference BF16
// rounding. The run time must be N + K + 3 cycles. Two layers of different
// lengths are run back to back.
module tb_wcfe;
  import bf16_ref_pkg::*;
  localparam int N_MAX = 1024, K = 16, ROWS = 4, COLS = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [1:0] wr_buf = 0, rd_buf = 0;
  logic [12:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic [10:0] cfg_n = 0;
  logic start = 0, busy, done;
  logic [5:0] feat_idx = 0;
  logic [15:0] feat;
  int checks = 0, failures = 0;

  logic [15:0] act [ROWS][N_MAX];
  logic [3:0]  idx [COLS][N_MAX];
  logic [15:0] wgt [COLS][K];
  logic [15:0] expv [ROWS][COLS];

  wcfe dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [1:0] b, input int a, input logic [31:0] d);
    @(negedge clk);
    wr_en = 1; wr_buf = b; wr_addr = 13'(a); wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic run_layer(input int n);
    int cyc;
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < n; i += 2) begin
        act[r][i] = bf_rand(118, 130); act[r][i+1] = bf_rand(118, 130);
        wr(2'd0, r*(N_MAX/2) + i/2, {act[r][i+1], act[r][i]});
      end
    for (int i = 0; i < n; i++) begin
      logic [63:0] row;
      for (int c = 0; c < COLS; c++) begin idx[c][i] = 4'($urandom); row[4*c +: 4] = idx[c][i]; end
      wr(2'd1, 2*i, row[31:0]);
      wr(2'd1, 2*i+1, row[63:32]);
    end
    for (int k = 0; k < K; k++)
      for (int c = 0; c < COLS; c += 2) begin
        wgt[c][k] = bf_rand(120, 128); wgt[c+1][k] = bf_rand(120, 128);
        wr(2'd2, k*8 + c/2, {wgt[c+1][k], wgt[c][k]});
      end
    // model
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        logic [15:0] b [K];
        logic [15:0] acc;
        for (int k = 0; k < K; k++) b[k] = 0;
        for (int i = 0; i < n; i++) b[idx[c][i]] = bf_add(b[idx[c][i]], act[r][i]);
        acc = 0;
        for (int k = 0; k < K; k++) acc = bf_add(acc, bf_mul(b[k], wgt[c][k]));
        expv[r][c] = acc;
      end
    cfg_n <= 11'(n);
    start <= 1; @(posedge clk); start <= 0;
    cyc = 0;
    #1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != n + K + 3) begin failures++; $display("FAIL latency %0d want %0d", cyc, n + K + 3); end
    @(posedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c += 2) begin
        rd_buf <= 2'd3; rd_addr <= 13'(r*8 + c/2);
        @(posedge clk); #1;
        checks++;
        if (rd_data !== {expv[r][c+1], expv[r][c]}) begin
          failures++; $display("FAIL out r%0d c%0d got %h exp %h%h", r, c, rd_data, expv[r][c+1], expv[r][c]);
        end
        feat_idx = 6'(r*COLS + c); #1;
        checks++;
        if (feat !== expv[r][c]) begin failures++; $display("FAIL feat r%0d c%0d", r, c); end
      end
    // read back an index word and a weight word
    rd_buf <= 2'd1; rd_addr <= 13'd1; @(posedge clk); #1;
    checks++;
    if (rd_data[3:0] !== idx[8][0]) begin failures++; $display("FAIL idx readback"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_layer(24);
    run_layer(50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
