// tb_hd_module: end-to-end check of the HD classifier with a small
// configuration (f1 = 16, f2 = 16, 8 segments, 4 classes). The testbench keeps
// its own model: the query hypervector from the full Kronecker projection,
// saturating INT8 bundling for training, and segment-by-segment distances
// with the margin test for inference. It clears the CHV cache, trains noisy
// samples of four class prototypes, then infers new samples with progressive
// search on (small Th) and off, and once with an already-encoded query in
// the input buffer (encoder bypass). Predicted class, margin and number of
// segments used must match the model; early exits must occur; CHV words read
// through the host port must match the model.
module tb_hd_module;
  localparam int NC = 128, MS = 32, F1 = 16, F2 = 16, NSEG = 8, NCLS = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [1:0] wr_buf = 0, rd_buf = 0;
  logic [8:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic fe_we = 0;
  logic [9:0] fe_idx = 0;
  logic [7:0] fe_data = 0;
  logic [3:0] cfg_f1c = F1/8, cfg_prec = 8;
  logic [4:0] cfg_f2c = F2/8;
  logic [7:0] cfg_nseg = NSEG;
  logic [7:0] cfg_ncls = NCLS;
  logic [15:0] cfg_th = 0;
  logic cfg_prog = 0, cfg_raw = 0;
  logic start_infer = 0, start_train = 0, start_clear = 0;
  logic [6:0] train_label = 0;
  logic busy, done, early_exit;
  logic [6:0] result_cls;
  logic [31:0] result_margin;
  logic [7:0] segs_used;
  int checks = 0, failures = 0, early = 0, raw_runs = 0, full_runs = 0;

  logic A [F1][NSEG];
  logic B [F2][64];
  logic signed [7:0] proto [NCLS][F1*F2];
  logic signed [7:0] x [F1*F2];
  logic [63:0] qhv [NSEG];
  int chv [NCLS][NSEG*64];

  hd_module dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_wr(input logic [1:0] b, input int a, input logic [31:0] d);
    @(negedge clk); wr_en = 1; wr_buf = b; wr_addr = 9'(a); wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic load_weights();
    logic [255:0] row;
    for (int r = 0; r < 64; r++) begin
      row = '0;
      if (r < 2*(F2/8)) begin
        for (int t = 0; t < 32; t++) for (int j = 0; j < 8; j++) row[8*t+j] = B[8*(r/2)+j][32*(r%2)+t];
      end else if (r >= 32 && (r - 32) % 4 == 0 && (r - 32) / 4 < F1/8) begin
        // A rows: 4 per group of 8 features (32 segments each), base 32
        for (int s = 0; s < NSEG; s++) for (int j = 0; j < 8; j++) row[8*s+j] = A[8*((r-32)/4)+j][s];
      end
      for (int part = 0; part < 8; part++) host_wr(2'd1, r*8 + part, row[32*part +: 32]);
    end
  endtask

  task automatic make_sample(input int c);
    for (int i = 0; i < F1*F2; i++) begin
      int v;
      v = int'(proto[c][i]) + $urandom_range(0, 40) - 20;
      if (v > 127) v = 127;
      if (v < -128) v = -128;
      x[i] = 8'(v);
    end
    for (int s = 0; s < NSEG; s++)
      for (int k = 0; k < 64; k++) begin
        int h;
        h = 0;
        for (int p = 0; p < F1; p++)
          for (int q = 0; q < F2; q++) h += ((A[p][s] == B[q][k]) ? 1 : -1) * int'(x[p*F2+q]);
        qhv[s][k] = (h >= 0);
      end
  endtask

  // Write features: half through the host port, half through the feature port.
  task automatic load_features();
    for (int w = 0; w < F1*F2/8; w++) begin
      host_wr(2'd0, 2*w, {x[8*w+3], x[8*w+2], x[8*w+1], x[8*w]});
      for (int j = 4; j < 8; j++) begin
        @(negedge clk); fe_we = 1; fe_idx = 10'(8*w + j); fe_data = x[8*w+j];
        @(negedge clk); fe_we = 0;
      end
    end
  endtask

  task automatic go(input bit train, input int label);
    @(negedge clk);
    if (train) begin start_train = 1; train_label = 7'(label); end else start_infer = 1;
    @(negedge clk); start_train = 0; start_infer = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic model_infer(output int cls, output int marg, output int used);
    int d [NCLS];
    for (int c = 0; c < NCLS; c++) d[c] = 0;
    used = NSEG;
    for (int s = 0; s < NSEG; s++) begin
      int b, m2;
      for (int c = 0; c < NCLS; c++)
        for (int k = 0; k < 64; k++) d[c] += qhv[s][k] ? -chv[c][64*s+k] : chv[c][64*s+k];
      b = 0;
      for (int c = 1; c < NCLS; c++) if (d[c] < d[b]) b = c;
      m2 = 32'h7fffffff;
      for (int c = 0; c < NCLS; c++) if (c != b && d[c] < m2) m2 = d[c];
      cls = b; marg = m2 - d[b];
      if (cfg_prog && marg > int'(cfg_th)) begin used = s + 1; break; end
    end
  endtask

  initial begin
    for (int p = 0; p < F1; p++) for (int s = 0; s < NSEG; s++) A[p][s] = 1'($urandom);
    for (int q = 0; q < F2; q++) for (int k = 0; k < 64; k++) B[q][k] = 1'($urandom);
    for (int c = 0; c < NCLS; c++) for (int i = 0; i < F1*F2; i++) proto[c][i] = 8'($urandom_range(0, 160) - 80);
    for (int c = 0; c < NCLS; c++) for (int i = 0; i < NSEG*64; i++) chv[c][i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_weights();
    @(negedge clk); start_clear = 1; @(negedge clk); start_clear = 0;
    while (!done) @(negedge clk);
    // continual learning: classes arrive one after the other
    for (int c = 0; c < NCLS; c++)
      for (int n = 0; n < 3; n++) begin
        make_sample(c);
        load_features();
        go(1, c);
        for (int s = 0; s < NSEG; s++)
          for (int k = 0; k < 64; k++) begin
            int v;
            v = chv[c][64*s+k] + (qhv[s][k] ? 1 : -1);
            chv[c][64*s+k] = v > 127 ? 127 : (v < -128 ? -128 : v);
          end
        checks++;
        if (segs_used != NSEG) begin failures++; $display("FAIL train segs %0d", segs_used); end
      end
    // CHV readback through the host port (class 2, segment 3, part 5)
    host_wr(2'd3, 0, 32'd2);
    @(negedge clk); rd_buf = 2'd2; rd_addr = 9'(3*16 + 5); @(negedge clk);
    checks++;
    for (int k = 0; k < 4; k++)
      if ($signed(rd_data[8*k +: 8]) != chv[2][64*3 + 4*5 + k]) begin
        failures++; $display("FAIL chv readback"); break;
      end
    // segment page: write class 1, segment 68 (page 2, segment 4), part 7;
    // read it back and check that segment 4 of page 0 is untouched
    host_wr(2'd3, 0, (32'd2 << 8) | 32'd1);
    host_wr(2'd2, 4*16 + 7, 32'h5A3C_1E0F);
    @(negedge clk); rd_buf = 2'd2; rd_addr = 9'(4*16 + 7); @(negedge clk);
    checks++;
    if (rd_data != 32'h5A3C_1E0F) begin failures++; $display("FAIL page readback"); end
    host_wr(2'd3, 0, 32'd1);
    @(negedge clk); rd_buf = 2'd2; rd_addr = 9'(4*16 + 7); @(negedge clk);
    checks++;
    for (int k = 0; k < 4; k++)
      if ($signed(rd_data[8*k +: 8]) != chv[1][64*4 + 4*7 + k]) begin
        failures++; $display("FAIL page 0 disturbed"); break;
      end
    // inference
    for (int n = 0; n < 16; n++) begin
      int c, mc, mm, mu;
      c = $urandom_range(0, NCLS - 1);
      make_sample(c);
      cfg_raw = (n == 5);
      if (cfg_raw) begin
        for (int s = 0; s < NSEG; s++) begin
          host_wr(2'd0, 2*s, qhv[s][31:0]);
          host_wr(2'd0, 2*s+1, qhv[s][63:32]);
        end
        raw_runs++;
      end else load_features();
      cfg_prog = (n % 2 == 0);
      cfg_th = 16'($urandom_range(20, 300));
      model_infer(mc, mm, mu);
      go(0, 0);
      checks += 4;
      if (result_cls != 7'(mc)) begin failures++; $display("FAIL cls %0d exp %0d", result_cls, mc); end
      if (result_margin != 32'(mm)) begin failures++; $display("FAIL margin %0d exp %0d", result_margin, mm); end
      if (segs_used != 8'(mu)) begin failures++; $display("FAIL segs %0d exp %0d", segs_used, mu); end
      if (early_exit != (mu < NSEG)) begin failures++; $display("FAIL early flag"); end
      if (early_exit) early++;
      if (!cfg_prog) full_runs++;
    end
    checks += 2;
    if (early == 0) begin failures++; $display("FAIL no early exit"); end
    if (raw_runs == 0 || full_runs == 0) begin failures++; $display("FAIL modes not covered"); end
    $display("early exits %0d of 16", early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
