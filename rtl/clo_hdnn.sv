// clo_hdnn: top level of the continual on-device learning accelerator.
//
// A clustered-weight CNN feature extractor (WCFE) and a hyperdimensional
// classifier (HD module) sit behind one instruction-driven controller. In
// normal mode a sample runs FE_INFER and FE_LOAD before the HD instructions;
// in bypass mode, for simple inputs, the host writes features straight into
// the HD input buffer and the WCFE stays idle. The classifier learns without
// gradients by bundling encoded samples into class hypervectors and infers
// with progressive search, stopping once the best class leads by more than
// Th.
//
// Host link, in the IO clock domain: 37-bit words in (valid/ready, tag in
// bits 36:32: 1 instruction, 0 data) and 34-bit words out (valid/ready, tag in
// bits 33:32: 1 read data, 2 inference result). Both directions cross into
// the core clock through dual-clock FIFOs; core results queue in a
// synchronous output FIFO first. The clock generator and JTAG port of the
// chip are not part of this RTL: the core clock and IO clock are inputs.
// rst_n is active low and must be held for a few cycles of both clocks.
// Block structure and link widths follow the document; everything inside
// the link words and the FIFO depths are this design's own choices.
module clo_hdnn #(
  parameter int unsigned NUM_CLASSES = 128,
  parameter int unsigned MAX_SEG     = 128,
  parameter int unsigned N_MAX       = 1024,
  parameter int unsigned FIFO_DEPTH  = 16
) (
  input  logic        core_clk,
  input  logic        io_clk,
  input  logic        rst_n,
  input  logic        host_in_valid,
  input  logic [36:0] host_in_word,
  output logic        host_in_ready,
  output logic        host_out_valid,
  output logic [33:0] host_out_word,
  input  logic        host_out_ready,
  output logic        wcfe_busy,
  output logic        hd_busy
);
  // ---------------- host link: IO clock -> core clock ----------------
  logic        in_full, in_empty, in_pop;
  logic [36:0] in_word;

  cdc_fifo #(.W(37), .DEPTH(FIFO_DEPTH)) u_cdc_in (
    .wclk(io_clk), .wrst_n(rst_n), .push(host_in_valid && !in_full), .wdata(host_in_word), .full(in_full),
    .rclk(core_clk), .rrst_n(rst_n), .pop(in_pop), .rdata(in_word), .empty(in_empty)
  );
  assign host_in_ready = !in_full;

  // ---------------- core -> IO clock ----------------
  logic        of_push, of_full, of_empty, co_full, co_empty;
  logic [33:0] of_wdata, of_rdata;
  logic        move;

  sync_fifo #(.W(34), .DEPTH(FIFO_DEPTH)) u_ofifo (
    .clk(core_clk), .rst_n, .push(of_push), .wdata(of_wdata), .full(of_full),
    .pop(move), .rdata(of_rdata), .empty(of_empty)
  );
  assign move = !of_empty && !co_full;

  cdc_fifo #(.W(34), .DEPTH(FIFO_DEPTH)) u_cdc_out (
    .wclk(core_clk), .wrst_n(rst_n), .push(move), .wdata(of_rdata), .full(co_full),
    .rclk(io_clk), .rrst_n(rst_n), .pop(host_out_ready && !co_empty), .rdata(host_out_word), .empty(co_empty)
  );
  assign host_out_valid = !co_empty;

  // ---------------- controller ----------------
  logic        fe_wr_en, fe_start, fe_done, fe_busy_w;
  logic [1:0]  fe_wr_buf, fe_rd_buf;
  logic [12:0] fe_wr_addr, fe_rd_addr;
  logic [31:0] fe_wr_data, fe_rd_data;
  logic [10:0] fe_cfg_n;
  logic [5:0]  fe_feat_idx;
  logic [15:0] fe_feat;
  logic        hd_wr_en, hd_fe_we, hd_prog, hd_raw, hd_si, hd_st, hd_sc, hd_done, hd_early, hd_busy_w;
  logic [1:0]  hd_wr_buf, hd_rd_buf;
  logic [8:0]  hd_wr_addr, hd_rd_addr;
  logic [31:0] hd_wr_data, hd_rd_data, hd_margin;
  logic [9:0]  hd_fe_idx;
  logic [7:0]  hd_fe_data, hd_ncls;
  logic [3:0]  hd_f1c, hd_prec;
  logic [4:0]  hd_f2c;
  logic [7:0]  hd_nseg, hd_segs;
  logic [15:0] hd_th;
  logic [6:0]  hd_label, hd_cls;

  clo_ctrl u_ctrl (
    .clk(core_clk), .rst_n,
    .in_valid(!in_empty), .in_word, .in_pop,
    .out_push(of_push), .out_word(of_wdata), .out_full(of_full),
    .fe_wr_en, .fe_wr_buf, .fe_wr_addr, .fe_wr_data, .fe_rd_buf, .fe_rd_addr, .fe_rd_data,
    .fe_cfg_n, .fe_start, .fe_done, .fe_feat_idx, .fe_feat,
    .hd_wr_en, .hd_wr_buf, .hd_wr_addr, .hd_wr_data, .hd_rd_buf, .hd_rd_addr, .hd_rd_data,
    .hd_fe_we, .hd_fe_idx, .hd_fe_data,
    .hd_f1c, .hd_f2c, .hd_nseg, .hd_ncls, .hd_prec, .hd_th, .hd_prog, .hd_raw,
    .hd_start_infer(hd_si), .hd_start_train(hd_st), .hd_label, .hd_start_clear(hd_sc),
    .hd_done, .hd_cls, .hd_margin, .hd_segs, .hd_early
  );

  // ---------------- feature extractor ----------------
  wcfe #(.N_MAX(N_MAX)) u_wcfe (
    .clk(core_clk), .rst_n,
    .wr_en(fe_wr_en), .wr_buf(fe_wr_buf), .wr_addr(fe_wr_addr), .wr_data(fe_wr_data),
    .rd_buf(fe_rd_buf), .rd_addr(fe_rd_addr), .rd_data(fe_rd_data),
    .cfg_n(fe_cfg_n), .start(fe_start), .busy(fe_busy_w), .done(fe_done),
    .feat_idx(fe_feat_idx), .feat(fe_feat)
  );

  // ---------------- HD classifier ----------------
  hd_module #(.NUM_CLASSES(NUM_CLASSES), .MAX_SEG(MAX_SEG)) u_hd (
    .clk(core_clk), .rst_n,
    .wr_en(hd_wr_en), .wr_buf(hd_wr_buf), .wr_addr(hd_wr_addr), .wr_data(hd_wr_data),
    .rd_buf(hd_rd_buf), .rd_addr(hd_rd_addr), .rd_data(hd_rd_data),
    .fe_we(hd_fe_we), .fe_idx(hd_fe_idx), .fe_data(hd_fe_data),
    .cfg_f1c(hd_f1c), .cfg_f2c(hd_f2c), .cfg_nseg(hd_nseg), .cfg_ncls(hd_ncls),
    .cfg_prec(hd_prec), .cfg_th(hd_th), .cfg_prog(hd_prog), .cfg_raw(hd_raw),
    .start_infer(hd_si), .start_train(hd_st), .train_label(hd_label), .start_clear(hd_sc),
    .busy(hd_busy_w), .done(hd_done), .result_cls(hd_cls), .result_margin(hd_margin),
    .segs_used(hd_segs), .early_exit(hd_early)
  );

  assign wcfe_busy = fe_busy_w;
  assign hd_busy   = hd_busy_w;
endmodule
