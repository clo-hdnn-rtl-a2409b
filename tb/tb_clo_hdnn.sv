// tb_clo_hdnn: end-to-end test of the accelerator through its host link,
// with unrelated core (10 ns) and IO (14 ns) clocks and the top's default
// parameters. Everything goes through instructions:
//   1. encoder weights are stored (STORE_BUF), the CHV cache is cleared;
//   2. bypass mode: four classes are learned one after another from noisy
//      samples written straight into the HD input buffer (HD_TRAIN), then
//      new samples are classified (HD_INFER) with progressive search on and
//      off, and with 1-bit and 8-bit precision;
//   3. normal mode: activations, centroid indices and centroid weights are
//      stored, FE_INFER runs the PE array, the outputs are read back
//      (READ_BUF) and checked, FE_LOAD moves them into the HD input buffer
//      as INT8 and the sample is classified with an 8 x 8 feature shape.
// A model in the testbench (direct Kronecker projection, saturating INT8
// bundling, segment-wise distances with the margin test, reference BF16
// arithmetic) predicts every result word. The host stalls the output link
// at random. Counted mechanisms, each of which must occur: training, CHV
// clear, bypass inference, normal-mode inference, early exit, full-length
// search, 1-bit search, buffer read-back, input-link back-pressure and
// output-link stall.
module tb_clo_hdnn;
  import clo_pkg::*;
  import bf16_ref_pkg::*;
  localparam int NSEG = 8, NCLS = 4;
  logic core_clk = 0, io_clk = 0, rst_n = 0;
  logic host_in_valid = 0, host_in_ready, host_out_valid, host_out_ready = 0;
  logic [36:0] host_in_word = 0;
  logic [33:0] host_out_word;
  logic wcfe_busy, hd_busy;
  int checks = 0, failures = 0;
  int n_train = 0, n_clear = 0, n_bypass = 0, n_normal = 0, n_early = 0, n_full = 0;
  int n_int1 = 0, n_readback = 0, n_in_stall = 0, n_out_stall = 0;

  clo_hdnn dut (.*);
  always #5 core_clk = ~core_clk;
  always #7 io_clk = ~io_clk;

  // ---------------- host link model ----------------
  logic [36:0] tx [$];
  logic [33:0] rx [$];
  always @(posedge io_clk) begin
    automatic logic sent = host_in_valid && host_in_ready;
    automatic logic got  = host_out_valid && host_out_ready;
    automatic logic [33:0] w = host_out_word;
    if (host_in_valid && !host_in_ready) n_in_stall++;
    if (host_out_valid && !host_out_ready) n_out_stall++;
    #1;
    if (sent) void'(tx.pop_front());
    if (got) rx.push_back(w);
    host_in_valid  = tx.size() > 0;
    host_in_word   = (tx.size() > 0) ? tx[0] : '0;
    host_out_ready = ($urandom_range(0, 3) != 0);
  end

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [36:0] ins(input opcode_e op, input logic [15:0] operand);
    return {TAG_INSTR, 12'd0, op, operand};
  endfunction
  task automatic store(input bit dst, input int b, input int word, input logic [31:0] d []);
    // word must be a multiple of 8; d holds up to 8 words
    int burst;
    burst = (d.size() == 8) ? 3 : (d.size() == 4) ? 2 : (d.size() == 2) ? 1 : 0;
    tx.push_back({TAG_INSTR, 12'd0, OP_STORE_BUF, 1'b0, dst, 2'(burst), 3'(b), 9'(word / 8)});
    foreach (d[i]) tx.push_back({TAG_DATA, d[i]});
  endtask
  task automatic wait_rx(input int n);
    int t;
    t = 0;
    while (rx.size() < n && t < 40000) begin @(posedge io_clk); t++; end
  endtask
  task automatic wait_idle();
    int t;
    t = 0;
    while ((tx.size() > 0 || dut.u_ctrl.state != 0 || hd_busy || wcfe_busy) && t < 100000) begin
      @(posedge core_clk); t++;
    end
    repeat (4) @(posedge core_clk);
  endtask
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- HD model ----------------
  logic A [64][NSEG];
  logic B [128][64];
  logic signed [7:0] x [1024];
  logic [63:0] qhv [NSEG];
  int chv [NCLS][NSEG*64];
  logic signed [7:0] proto [NCLS][256];

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

  function automatic int red(input int e, input int prec);
    if (prec == 1) return (e < 0) ? -1 : 1;
    return int'($floor(real'(e) / real'(1 << (8 - prec))));
  endfunction

  task automatic model_infer(input bit prog, input int th, input int prec,
                             output int cls, output int marg, output int used);
    int d [NCLS];
    for (int c = 0; c < NCLS; c++) d[c] = 0;
    used = NSEG;
    for (int s = 0; s < NSEG; s++) begin
      int b, m2;
      for (int c = 0; c < NCLS; c++)
        for (int k = 0; k < 64; k++) d[c] += qhv[s][k] ? -red(chv[c][64*s+k], prec) : red(chv[c][64*s+k], prec);
      b = 0;
      for (int c = 1; c < NCLS; c++) if (d[c] < d[b]) b = c;
      m2 = 32'h7fffffff;
      for (int c = 0; c < NCLS; c++) if (c != b && d[c] < m2) m2 = d[c];
      cls = b; marg = m2 - d[b];
      if (prog && marg > th) begin used = s + 1; break; end
    end
  endtask

  task automatic send_features(input int n);
    for (int w = 0; w < n / 4; w += 8) begin
      logic [31:0] d [];
      d = new[8];
      for (int i = 0; i < 8; i++) d[i] = {x[4*(w+i)+3], x[4*(w+i)+2], x[4*(w+i)+1], x[4*(w+i)]};
      store(1'b1, 0, w, d);
    end
  endtask

  task automatic infer_and_check(input bit prog, input int th, input int prec, input string what);
    int mc, mm, mu, n0;
    logic [33:0] r;
    model_infer(prog, th, prec, mc, mm, mu);
    tx.push_back(ins(OP_HD_ENC_SEG, {prog, 1'b0, 14'(th)}));
    tx.push_back(ins(OP_HD_INFER, {4'd0, 8'(NCLS), 4'(prec)}));
    n0 = rx.size();
    wait_rx(n0 + 1);
    r = rx[n0];
    chk(r[33:32] == OTAG_RESULT, {what, " tag"});
    chk(r[6:0] == 7'(mc), {what, " class"});
    chk(r[14:7] == 8'(mu), {what, " segments"});
    chk(r[15] == (mu < NSEG), {what, " early flag"});
    chk(r[31:16] == ((mm > 65535) ? 16'hFFFF : 16'(mm)), {what, " margin"});
    if (mu < NSEG) n_early++; else n_full++;
    if (prec == 1) n_int1++;
  endtask

  initial begin
    logic [255:0] row;
    repeat (4) @(posedge io_clk);
    rst_n = 1;
    repeat (4) @(posedge io_clk);
    // ---- 1. encoder weights ----
    for (int p = 0; p < 64; p++) for (int s = 0; s < NSEG; s++) A[p][s] = 1'($urandom);
    for (int q = 0; q < 128; q++) for (int k = 0; k < 64; k++) B[q][k] = 1'($urandom);
    // B rows 0..31; A rows 32 + 4*group (4 rows of 32 segments per group)
    for (int r = 0; r < 64; r++) begin
      logic [31:0] d [];
      if (r >= 32 && (r - 32) % 4 != 0) continue;
      row = '0;
      if (r < 32) begin
        for (int t = 0; t < 32; t++) for (int j = 0; j < 8; j++) row[8*t+j] = B[8*(r/2)+j][32*(r%2)+t];
      end else begin
        for (int s = 0; s < NSEG; s++) for (int j = 0; j < 8; j++) row[8*s+j] = A[8*((r-32)/4)+j][s];
      end
      d = new[8];
      for (int part = 0; part < 8; part++) d[part] = row[32*part +: 32];
      store(1'b1, 1, r*8, d);
    end
    tx.push_back(ins(OP_HD_TRAIN, 16'h8000));  // clear CHVs
    n_clear++;
    for (int c = 0; c < NCLS; c++) for (int i = 0; i < NSEG*64; i++) chv[c][i] = 0;
    for (int c = 0; c < NCLS; c++) for (int i = 0; i < 256; i++) proto[c][i] = 8'($urandom_range(0, 160) - 80);
    // ---- 2. bypass mode, F = 16 x 16 ----
    tx.push_back(ins(OP_HD_ENC_PRELOAD, {7'(NSEG - 1), 5'd2, 4'd2}));
    for (int c = 0; c < NCLS; c++)
      for (int n = 0; n < 2; n++) begin
        for (int i = 0; i < 256; i++) begin
          int v;
          v = int'(proto[c][i]) + $urandom_range(0, 40) - 20;
          x[i] = 8'(v > 127 ? 127 : (v < -128 ? -128 : v));
        end
        encode(16, 16);
        send_features(256);
        tx.push_back(ins(OP_HD_TRAIN, 16'(c)));
        n_train++;
        for (int s = 0; s < NSEG; s++)
          for (int k = 0; k < 64; k++) begin
            int v;
            v = chv[c][64*s+k] + (qhv[s][k] ? 1 : -1);
            chv[c][64*s+k] = v > 127 ? 127 : (v < -128 ? -128 : v);
          end
      end
    for (int n = 0; n < 6; n++) begin
      int c;
      c = $urandom_range(0, NCLS - 1);
      for (int i = 0; i < 256; i++) begin
        int v;
        v = int'(proto[c][i]) + $urandom_range(0, 60) - 30;
        x[i] = 8'(v > 127 ? 127 : (v < -128 ? -128 : v));
      end
      encode(16, 16);
      send_features(256);
      infer_and_check(n % 2 == 0, $urandom_range(10, 60), (n == 3) ? 1 : 8, "bypass");
      n_bypass++;
    end
    // ---- 3. normal mode: WCFE with 16 inputs per row, HD with F = 8 x 8 ----
    begin
      logic [15:0] act [4][16];
      logic [3:0]  idx [16][16];
      logic [15:0] wgt [16][16];
      logic [15:0] fo [64];
      int n0;
      for (int r = 0; r < 4; r++) begin
        logic [31:0] d [];
        d = new[8];
        for (int i = 0; i < 16; i++) act[r][i] = bf_rand(120, 128);
        for (int i = 0; i < 8; i++) d[i] = {act[r][2*i+1], act[r][2*i]};
        store(1'b0, 0, r * 512, d);
      end
      for (int i = 0; i < 16; i += 4) begin
        logic [31:0] d [];
        d = new[8];
        for (int ii = 0; ii < 4; ii++) begin
          logic [63:0] w64;
          for (int c = 0; c < 16; c++) begin idx[c][i+ii] = 4'($urandom); w64[4*c +: 4] = idx[c][i+ii]; end
          d[2*ii] = w64[31:0]; d[2*ii+1] = w64[63:32];
        end
        store(1'b0, 1, 2*i, d);
      end
      for (int k = 0; k < 16; k++) begin
        logic [31:0] d [];
        d = new[8];
        for (int c = 0; c < 16; c++) wgt[c][k] = bf_rand(118, 126);
        for (int i = 0; i < 8; i++) d[i] = {wgt[2*i+1][k], wgt[2*i][k]};
        store(1'b0, 2, 8*k, d);
      end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 16; c++) begin
          logic [15:0] b [16];
          logic [15:0] acc;
          for (int k = 0; k < 16; k++) b[k] = 0;
          for (int i = 0; i < 16; i++) b[idx[c][i]] = bf_add(b[idx[c][i]], act[r][i]);
          acc = 0;
          for (int k = 0; k < 16; k++) acc = bf_add(acc, bf_mul(b[k], wgt[c][k]));
          fo[16*r + c] = acc;
        end
      tx.push_back(ins(OP_FE_CONFIG, 16'd16));
      tx.push_back(ins(OP_FE_INFER, 16'd0));
      // read back the 32 output words
      n0 = rx.size();
      for (int blk = 0; blk < 4; blk++)
        tx.push_back({TAG_INSTR, 12'd0, OP_READ_BUF, 1'b0, 1'b0, 2'd3, 3'd3, 9'(blk)});
      wait_rx(n0 + 32);
      for (int i = 0; i < 32; i++) begin
        chk(rx[n0+i] == {OTAG_DATA, fo[2*i+1], fo[2*i]}, "wcfe output");
        n_readback++;
      end
      // features to INT8 with scale 2**4, into block 0
      for (int i = 0; i < 64; i++) begin
        real rv;
        int v;
        rv = bf2r(fo[i]) * 16.0;
        v = (rv >= 0) ? int'($floor(rv)) : -int'($floor(-rv));
        x[i] = 8'(v > 127 ? 127 : (v < -128 ? -128 : v));
      end
      tx.push_back(ins(OP_FE_LOAD, {7'd0, 4'd0, 5'd4}));
      tx.push_back(ins(OP_HD_ENC_PRELOAD, {7'(NSEG - 1), 5'd1, 4'd1}));
      encode(8, 8);
      infer_and_check(1'b0, 0, 8, "normal");
      n_normal++;
    end
    wait_idle();
    chk(tx.size() == 0, "all words consumed");
    chk(n_train > 0, "training happened");
    chk(n_clear > 0, "clear happened");
    chk(n_bypass > 0, "bypass inference happened");
    chk(n_normal > 0, "normal-mode inference happened");
    chk(n_early > 0, "early exit happened");
    chk(n_full > 0, "full search happened");
    chk(n_int1 > 0, "1-bit search happened");
    chk(n_readback > 0, "read-back happened");
    chk(n_in_stall > 0, "input back-pressure happened");
    chk(n_out_stall > 0, "output stall happened");
    $display("train %0d clear %0d bypass %0d normal %0d early %0d full %0d int1 %0d readback %0d in_stall %0d out_stall %0d",
             n_train, n_clear, n_bypass, n_normal, n_early, n_full, n_int1, n_readback, n_in_stall, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
