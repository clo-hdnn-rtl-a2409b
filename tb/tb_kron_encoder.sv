// tb_kron_encoder: checks the Kronecker HD encoder against a direct
// projection. Random INT8 features and random bipolar factor matrices A and
// B are generated; the expected hypervector bit (64*s + k) is the sign of
// sum over all (p, q) of x[p][q] * A[p][s] * B[q][k], i.e. the input times
// the full Kronecker-product projection matrix, computed without the
// two-stage factorisation. Segments are requested in a shuffled order, for
// two feature shapes, and the stage-1 and per-segment cycle counts are
// checked against f1*2*(f2/8) + 2 and 2*(f1/8) + 2.
module tb_kron_encoder;
  localparam int F1_MAX = 64, F2C_MAX = 16, MAX_SEG = 128;
  logic clk = 0, rst_n = 0;
  logic wb_we = 0;
  logic [8:0] wb_addr = 0, wb_raddr = 0;
  logic [31:0] wb_data = 0, wb_rdata;
  logic [3:0] cfg_f1c = 0;
  logic [4:0] cfg_f2c = 0;
  logic start_pre = 0, start_seg = 0, busy, seg_valid;
  logic [6:0] seg_idx = 0;
  logic [63:0] seg_bits;
  logic [6:0] fb_raddr;
  logic [63:0] fb_rdata;
  int checks = 0, failures = 0;

  logic signed [7:0] x [1024];
  logic A [F1_MAX][MAX_SEG];
  logic B [128][64];
  logic [255:0] wrow [64];

  kron_encoder dut (.*);
  always #5 clk = ~clk;

  // input buffer model: registered read of 8 features
  always_ff @(posedge clk)
    for (int j = 0; j < 8; j++) fb_rdata[8*j +: 8] <= x[8*fb_raddr + j];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wb_write_rows();
    for (int r = 0; r < 64; r++)
      for (int part = 0; part < 8; part++) begin
        @(negedge clk);
        wb_we = 1; wb_addr = 9'(r*8 + part); wb_data = wrow[r][32*part +: 32];
      end
    @(negedge clk); wb_we = 0;
  endtask

  task automatic run(input int f1, input int f2, input int nseg);
    int cyc;
    int order [];
    for (int i = 0; i < f1*f2; i++) x[i] = 8'($urandom);
    for (int p = 0; p < F1_MAX; p++) for (int s = 0; s < MAX_SEG; s++) A[p][s] = 1'($urandom);
    for (int q = 0; q < 128; q++) for (int k = 0; k < 64; k++) B[q][k] = 1'($urandom);
    for (int r = 0; r < 64; r++) wrow[r] = '0;
    for (int c = 0; c < F2C_MAX; c++)
      for (int h = 0; h < 2; h++)
        for (int t = 0; t < 32; t++)
          for (int j = 0; j < 8; j++) wrow[2*c+h][8*t+j] = B[8*c+j][32*h+t];
    for (int c = 0; c < F1_MAX/8; c++)
      for (int s = 0; s < MAX_SEG; s++)
        for (int j = 0; j < 8; j++) wrow[32 + c*4 + s/32][8*(s%32)+j] = A[8*c+j][s];
    wb_write_rows();
    // read back one word of the weight buffer
    @(negedge clk); wb_raddr = 9'(37*8 + 5); @(negedge clk);
    checks++;
    if (wb_rdata !== wrow[37][160 +: 32]) begin failures++; $display("FAIL wbuf readback"); end
    cfg_f1c = 4'(f1/8); cfg_f2c = 5'(f2/8);
    @(negedge clk); start_pre = 1; @(negedge clk); start_pre = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != f1*2*(f2/8) + 2) begin failures++; $display("FAIL pre cycles %0d", cyc); end
    order = new[nseg];
    for (int i = 0; i < nseg; i++) order[i] = i;
    order.shuffle();
    foreach (order[i]) begin
      logic [63:0] expb;
      int s;
      s = order[i];
      for (int k = 0; k < 64; k++) begin
        int h;
        h = 0;
        for (int p = 0; p < f1; p++)
          for (int q = 0; q < f2; q++)
            h += ((A[p][s] == B[q][k]) ? 1 : -1) * int'(x[p*f2+q]);
        expb[k] = (h >= 0);
      end
      seg_idx = 7'(s); start_seg = 1; @(negedge clk); start_seg = 0;
      cyc = 1;
      while (!seg_valid) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 2*(f1/8) + 2) begin failures++; $display("FAIL seg cycles %0d", cyc); end
      checks++;
      if (seg_bits !== expb) begin failures++; $display("FAIL seg %0d got %h exp %h", s, seg_bits, expb); end
      while (busy) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(16, 24, 8);
    run(32, 32, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
