// tb_clo_ctrl: checks the instruction decoder on its own. A word queue
// stands in for the host link; simple models answer the WCFE and HD done
// signals and return known read data. Checked: STORE_BUF bursts (buffer,
// side, word addresses, data), READ_BUF bursts (tags and data on the output,
// with back-pressure), every configuration field, the start pulses, FE_LOAD
// (64 features converted from BF16 to INT8, compared with a real-valued
// conversion) and the HD_INFER result word.
module tb_clo_ctrl;
  import clo_pkg::*;
  import bf16_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_pop, out_push, out_full = 0;
  logic [36:0] in_word;
  logic [33:0] out_word;
  logic fe_wr_en, fe_start, fe_done = 0, hd_wr_en, hd_fe_we, hd_prog, hd_raw;
  logic hd_start_infer, hd_start_train, hd_start_clear, hd_done = 0, hd_early = 0;
  logic [1:0] fe_wr_buf, fe_rd_buf, hd_wr_buf, hd_rd_buf;
  logic [12:0] fe_wr_addr, fe_rd_addr;
  logic [8:0] hd_wr_addr, hd_rd_addr;
  logic [31:0] fe_wr_data, fe_rd_data, hd_wr_data, hd_rd_data, hd_margin = 0;
  logic [10:0] fe_cfg_n;
  logic [5:0] fe_feat_idx;
  logic [7:0] hd_nseg, hd_segs = 0;
  logic [15:0] fe_feat, hd_th;
  logic [9:0] hd_fe_idx;
  logic [7:0] hd_fe_data, hd_ncls;
  logic [3:0] hd_f1c, hd_prec;
  logic [4:0] hd_f2c;
  logic [6:0] hd_label, hd_cls = 0;
  int checks = 0, failures = 0;
  logic [36:0] q [$];
  logic [33:0] outs [$];
  logic [15:0] feats [64];
  logic [7:0] loaded [1024];
  typedef struct { logic side; logic [1:0] b; int a; logic [31:0] d; } wr_t;
  wr_t writes [$];

  clo_ctrl dut (.*);
  always #5 clk = ~clk;

  assign in_valid = q.size() > 0;
  assign in_word  = (q.size() > 0) ? q[0] : '0;
  assign fe_rd_data = 32'hF0000000 | 32'(fe_rd_addr) | (32'(fe_rd_buf) << 16);
  assign hd_rd_data = 32'hA0000000 | 32'(hd_rd_addr) | (32'(hd_rd_buf) << 16);
  assign fe_feat = feats[fe_feat_idx];

  // The queue head is removed just after the edge on which the controller
  // popped it, so the controller samples the word it acknowledged.
  always @(posedge clk) begin
    automatic logic popped = in_pop;
    #1;
    if (popped) void'(q.pop_front());
  end

  always @(posedge clk) begin
    if (out_push) outs.push_back(out_word);
    if (fe_wr_en) writes.push_back('{1'b0, fe_wr_buf, int'(fe_wr_addr), fe_wr_data});
    if (hd_wr_en) writes.push_back('{1'b1, hd_wr_buf, int'(hd_wr_addr), hd_wr_data});
    if (hd_fe_we) loaded[hd_fe_idx] <= hd_fe_data;
    fe_done <= fe_start;
    hd_done <= hd_start_infer | hd_start_train | hd_start_clear;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [36:0] ins(input opcode_e op, input logic [15:0] operand);
    return {TAG_INSTR, 12'd0, op, operand};
  endfunction
  function automatic logic [36:0] mem(input opcode_e op, input bit src, input bit dst,
                                     input int burst, input int b, input int a);
    return {TAG_INSTR, 12'd0, op, src, dst, 2'(burst), 3'(b), 9'(a)};
  endfunction
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic drain();
    int n;
    n = 0;
    while ((q.size() > 0 || dut.state != 0) && n < 5000) begin @(negedge clk); n++; end
    repeat (3) @(negedge clk);
  endtask
  function automatic logic [7:0] ref_q(input logic [15:0] x, input int sh);
    real r;
    int v;
    r = bf2r(x) * (2.0 ** sh);
    v = (r >= 0) ? int'($floor(r)) : -int'($floor(-r));
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return 8'(v);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // STORE_BUF: 4 words to WCFE index memory at block 5, 8 words to HD buffer 1 at block 2
    q.push_back(mem(OP_STORE_BUF, 0, 0, 2, 1, 5));
    for (int i = 0; i < 4; i++) q.push_back({TAG_DATA, 32'(100 + i)});
    q.push_back(mem(OP_STORE_BUF, 0, 1, 3, 1, 2));
    for (int i = 0; i < 8; i++) q.push_back({TAG_DATA, 32'(200 + i)});
    drain();
    chk(writes.size() == 12, "store count");
    for (int i = 0; i < 4 && i < writes.size(); i++)
      chk(writes[i].side == 0 && writes[i].b == 1 && writes[i].a == 40 + i && writes[i].d == 100 + i, "fe store");
    for (int i = 0; i < 8 && i + 4 < writes.size(); i++)
      chk(writes[4+i].side == 1 && writes[4+i].b == 1 && writes[4+i].a == 16 + i && writes[4+i].d == 200 + i, "hd store");
    // READ_BUF with back-pressure
    fork
      begin out_full = 1; repeat (7) @(negedge clk); out_full = 0; end
    join_none
    q.push_back(mem(OP_READ_BUF, 1, 0, 1, 2, 3));
    q.push_back(mem(OP_READ_BUF, 0, 0, 2, 3, 1));
    drain();
    chk(outs.size() == 6, "read count");
    for (int i = 0; i < 2 && i < outs.size(); i++) chk(outs[i] == {OTAG_DATA, 32'hA0000000 | (32'd2 << 16) | 32'(24 + i)}, "hd read");
    for (int i = 0; i < 4 && i + 2 < outs.size(); i++) chk(outs[2+i] == {OTAG_DATA, 32'hF0000000 | (32'd3 << 16) | 32'(8 + i)}, "fe read");
    // configuration
    q.push_back(ins(OP_FE_CONFIG, 16'd300));
    q.push_back(ins(OP_HD_ENC_PRELOAD, {7'd99, 5'd3, 4'd2}));
    q.push_back(ins(OP_HD_ENC_SEG, {1'b1, 1'b1, 14'd77}));
    drain();
    chk(fe_cfg_n == 300, "cfg n");
    chk(hd_f1c == 2 && hd_f2c == 3 && hd_nseg == 100, "preload fields");
    chk(hd_th == 77 && hd_prog == 1 && hd_raw == 1, "seg fields");
    // FE_INFER then FE_LOAD with shift -2 into block 3
    for (int i = 0; i < 64; i++) feats[i] = bf_rand(120, 136);
    q.push_back(ins(OP_FE_INFER, 16'd0));
    q.push_back(ins(OP_FE_LOAD, {7'd0, 4'd3, 5'b11110}));
    drain();
    for (int i = 0; i < 64; i++) begin chk(loaded[192 + i] == ref_q(feats[i], -2), "fe_load value"); end
    // HD_TRAIN, clear, HD_INFER with result word
    hd_cls = 7'd42; hd_segs = 8'd128; hd_early = 1; hd_margin = 32'd1234;
    q.push_back(ins(OP_HD_TRAIN, 16'd9));
    q.push_back(ins(OP_HD_TRAIN, 16'h8000));
    q.push_back(ins(OP_HD_INFER, {4'd0, 8'd26, 4'd4}));
    drain();
    chk(hd_label == 9, "label");
    chk(hd_prec == 4 && hd_ncls == 26, "infer fields");
    chk(outs.size() == 7, "result count");
    if (outs.size() == 7) chk(outs[6] == {OTAG_RESULT, 16'd1234, 1'b1, 8'd128, 7'd42}, "result word");
    hd_margin = 32'h12345;
    q.push_back(ins(OP_HD_INFER, {4'd0, 8'd26, 4'd4}));
    drain();
    if (outs.size() == 8) chk(outs[7][31:16] == 16'hFFFF, "margin saturation");
    else chk(0, "second result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
