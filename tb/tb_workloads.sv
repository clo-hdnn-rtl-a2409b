// tb_workloads: runs the two bypass-mode workload shapes the accelerator was
// evaluated with, at D = 2048 (32 segments), through the host link of the
// top level at its default parameters:
//   isolet-like: 26 classes, 617 features zero-padded to 640 = 8 x 80
//   ucihar-like:  6 classes, 561 features zero-padded to 576 = 8 x 72
// The samples are synthetic (noisy copies of random class prototypes), so
// the accuracy and the saved search work printed at the end describe this
// data only. For each workload the class vectors are cleared, every class is
// trained from a few samples, and each test sample is classified three times
// with 1-bit class vectors: full search, progressive search with Th = 64 and
// with Th = 32. Every result word (class, margin, segments used, early flag)
// is compared with the testbench's own model of encoder and search. The test
// fails if progressive search never stops early or if Th = 32 ever searches
// more segments than Th = 64 for the same sample.
module tb_workloads;
  import clo_pkg::*;
  localparam int NSEG = 32;
  logic core_clk = 0, io_clk = 0, rst_n = 0;
  logic host_in_valid = 0, host_in_ready, host_out_valid, host_out_ready = 0;
  logic [36:0] host_in_word = 0;
  logic [33:0] host_out_word;
  logic wcfe_busy, hd_busy;
  int checks = 0, failures = 0, n_early = 0;

  clo_hdnn dut (.*);
  always #5 core_clk = ~core_clk;
  always #7 io_clk = ~io_clk;

  logic [36:0] tx [$];
  logic [33:0] rx [$];
  always @(posedge io_clk) begin
    automatic logic sent = host_in_valid && host_in_ready;
    automatic logic got  = host_out_valid && host_out_ready;
    automatic logic [33:0] w = host_out_word;
    #1;
    if (sent) void'(tx.pop_front());
    if (got) rx.push_back(w);
    host_in_valid  = tx.size() > 0;
    host_in_word   = (tx.size() > 0) ? tx[0] : '0;
    host_out_ready = 1'b1;
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [36:0] ins(input opcode_e op, input logic [15:0] operand);
    return {TAG_INSTR, 12'd0, op, operand};
  endfunction
  task automatic store8(input int b, input int word, input logic [31:0] d [8]);
    tx.push_back({TAG_INSTR, 12'd0, OP_STORE_BUF, 1'b0, 1'b1, 2'd3, 3'(b), 9'(word / 8)});
    for (int i = 0; i < 8; i++) tx.push_back({TAG_DATA, d[i]});
  endtask
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wait_rx(input int n);
    int t;
    t = 0;
    while (rx.size() < n && t < 200000) begin @(posedge io_clk); t++; end
  endtask

  logic A [64][NSEG];
  logic B [128][64];
  logic signed [7:0] x [1024];
  logic [63:0] qhv [NSEG];
  int chv [32][NSEG*64];
  logic signed [7:0] proto [32][1024];

  task automatic encode(input int f1, input int f2);
    for (int s = 0; s < NSEG; s++)
      for (int k = 0; k < 64; k++) begin
        int h;
        h = 0;
        for (int p = 0; p < f1; p++)
          for (int q = 0; q < f2; q++) h += ((A[p][s] == B[q][k]) ? 1 : -1) * int'(x[p*f2+q]);
        qhv[s][k] = (h >= 0);
      end
  endtask

  task automatic model_infer(input int ncls, input bit prog, input int th,
                             output int cls, output int marg, output int used);
    int d [32];
    for (int c = 0; c < ncls; c++) d[c] = 0;
    used = NSEG;
    for (int s = 0; s < NSEG; s++) begin
      int b, m2;
      for (int c = 0; c < ncls; c++)
        for (int k = 0; k < 64; k++) d[c] += (qhv[s][k] == (chv[c][64*s+k] >= 0)) ? -1 : 1;
      b = 0;
      for (int c = 1; c < ncls; c++) if (d[c] < d[b]) b = c;
      m2 = 32'h7fffffff;
      for (int c = 0; c < ncls; c++) if (c != b && d[c] < m2) m2 = d[c];
      cls = b; marg = m2 - d[b];
      if (prog && marg > th) begin used = s + 1; break; end
    end
  endtask

  task automatic make_sample(input int c, input int nreal, input int nfeat, input int noise);
    for (int i = 0; i < nfeat; i++) begin
      int v;
      v = int'(proto[c][i]) + $urandom_range(0, 2*noise) - noise;
      x[i] = (i < nreal) ? 8'(v > 127 ? 127 : (v < -128 ? -128 : v)) : 8'd0;
    end
  endtask

  task automatic send_features(input int nfeat);
    for (int w = 0; w < nfeat / 4; w += 8) begin
      logic [31:0] d [8];
      for (int i = 0; i < 8; i++) d[i] = {x[4*(w+i)+3], x[4*(w+i)+2], x[4*(w+i)+1], x[4*(w+i)]};
      store8(0, w, d);
    end
  endtask

  task automatic run(input string name, input int ncls, input int f1, input int f2, input int nreal,
                     input int ntrain, input int ntest);
    int nfeat, seg_sum [3], correct [3], early;
    logic [31:0] d [8];
    nfeat = f1 * f2;
    early = 0;
    for (int m = 0; m < 3; m++) begin seg_sum[m] = 0; correct[m] = 0; end
    // encoder weights: B rows 2c+h, A rows 32 + 4c (32 segments fit one row)
    for (int r = 0; r < 2 * (f2 / 8); r++) begin
      logic [255:0] row;
      for (int t = 0; t < 32; t++) for (int j = 0; j < 8; j++) row[8*t+j] = B[8*(r/2)+j][32*(r%2)+t];
      for (int part = 0; part < 8; part++) d[part] = row[32*part +: 32];
      store8(1, r * 8, d);
    end
    for (int c = 0; c < f1 / 8; c++) begin
      logic [255:0] row;
      for (int s = 0; s < NSEG; s++) for (int j = 0; j < 8; j++) row[8*s+j] = A[8*c+j][s];
      for (int part = 0; part < 8; part++) d[part] = row[32*part +: 32];
      store8(1, (32 + 4*c) * 8, d);
    end
    tx.push_back(ins(OP_HD_TRAIN, 16'h8000));
    tx.push_back(ins(OP_HD_ENC_PRELOAD, {7'(NSEG - 1), 5'(f2 / 8), 4'(f1 / 8)}));
    for (int c = 0; c < ncls; c++) for (int i = 0; i < NSEG*64; i++) chv[c][i] = 0;
    for (int c = 0; c < ncls; c++) for (int i = 0; i < nfeat; i++) proto[c][i] = 8'($urandom_range(0, 100) - 50);
    // training, class after class as in class-incremental learning
    for (int c = 0; c < ncls; c++)
      for (int n = 0; n < ntrain; n++) begin
        make_sample(c, nreal, nfeat, 60);
        encode(f1, f2);
        send_features(nfeat);
        tx.push_back(ins(OP_HD_TRAIN, 16'(c)));
        for (int s = 0; s < NSEG; s++)
          for (int k = 0; k < 64; k++) begin
            int v;
            v = chv[c][64*s+k] + (qhv[s][k] ? 1 : -1);
            chv[c][64*s+k] = v > 127 ? 127 : (v < -128 ? -128 : v);
          end
      end
    // tests: full search, Th = 64, Th = 32
    for (int n = 0; n < ntest; n++) begin
      int c, used [3];
      c = $urandom_range(0, ncls - 1);
      make_sample(c, nreal, nfeat, 60);
      encode(f1, f2);
      send_features(nfeat);
      for (int m = 0; m < 3; m++) begin
        int mc, mm, mu, th, n0;
        bit prog;
        logic [33:0] r;
        prog = (m != 0);
        th = (m == 1) ? 64 : 32;
        model_infer(ncls, prog, th, mc, mm, mu);
        tx.push_back(ins(OP_HD_ENC_SEG, {prog, 1'b0, 14'(th)}));
        tx.push_back(ins(OP_HD_INFER, {4'd0, 8'(ncls), 4'd1}));
        n0 = rx.size();
        wait_rx(n0 + 1);
        r = rx[n0];
        chk(r[33:32] == OTAG_RESULT && r[6:0] == 7'(mc) && r[14:7] == 8'(mu) &&
            r[15] == (mu < NSEG) && r[31:16] == ((mm > 65535) ? 16'hFFFF : 16'(mm)), {name, " result"});
        used[m] = mu;
        seg_sum[m] += mu;
        if (mc == c) correct[m]++;
        if (mu < NSEG) early++;
      end
      chk(used[2] <= used[1], {name, " Th=32 searches no more than Th=64"});
    end
    n_early += early;
    $display("%s: %0d classes, F %0d (padded %0d = %0d x %0d), D %0d", name, ncls, nreal, nfeat, f1, f2, 64*NSEG);
    $display("  full search : accuracy %0d/%0d, segments %0d", correct[0], ntest, seg_sum[0]);
    $display("  Th = 64     : accuracy %0d/%0d, segments %0d (%0d%% less)", correct[1], ntest, seg_sum[1],
             100 - 100 * seg_sum[1] / seg_sum[0]);
    $display("  Th = 32     : accuracy %0d/%0d, segments %0d (%0d%% less)", correct[2], ntest, seg_sum[2],
             100 - 100 * seg_sum[2] / seg_sum[0]);
  endtask

  initial begin
    repeat (4) @(posedge io_clk);
    rst_n = 1;
    repeat (4) @(posedge io_clk);
    for (int p = 0; p < 64; p++) for (int s = 0; s < NSEG; s++) A[p][s] = 1'($urandom);
    for (int q = 0; q < 128; q++) for (int k = 0; k < 64; k++) B[q][k] = 1'($urandom);
    run("isolet-like", 26, 8, 80, 617, 2, 20);
    run("ucihar-like", 6, 8, 72, 561, 2, 12);
    chk(n_early > 0, "progressive search stopped early");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
