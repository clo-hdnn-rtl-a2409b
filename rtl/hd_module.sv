// hd_module: the hyperdimensional-computing classifier of the accelerator,
// with progressive search.
//
// Parts (as the document draws the HD module): an input buffer for the
// feature vector, the Kronecker HD encoder, a multiplexer that feeds the
// query segment either from the encoder's SIPO or straight from the input
// buffer (an already-encoded query hypervector), the HD search unit, the HD
// train unit and the CHV cache.
//
// Inference: stage 1 of the encoder runs once, then segment after segment is
// encoded (64 bits) and searched against every class; as soon as the margin
// between the best and the second-best class distance exceeds Th (and
// progressive search is enabled) the remaining segments are skipped.
// Training: every segment is encoded and bundled into the label's CHV.
// Clear: all CHV words are zeroed, one per cycle, before a new learning run.
// The order of operations and the early stop follow the document; the
// command interface, the buffer sizes and the sequencing are this design's.
//
// Host buffer access (32-bit words, reads one cycle after the address, only
// while idle):
//   buf 0 input buffer : addr[7:1] row of 8 INT8 features, addr[0] half
//   buf 1 encoder weight buffer (see kron_encoder)
//   buf 2 CHV cache    : class = class_sel, segment = {seg_page, addr[8:4]},
//                        addr[3:0] part
//   buf 3 data[6:0] class_sel, data[9:8] seg_page (segments 32*seg_page..)
// fe_we/fe_idx/fe_data write one INT8 feature (path from the feature
// extractor).
module hd_module #(
  parameter int unsigned NUM_CLASSES = 128,
  parameter int unsigned MAX_SEG     = 128,
  parameter int unsigned CHV_W       = 8,
  parameter int unsigned F1_MAX      = 64,
  parameter int unsigned F2C_MAX     = 16,
  parameter int unsigned FB_ROWS     = 128,
  localparam int unsigned CW         = $clog2(NUM_CLASSES),
  localparam int unsigned SW         = $clog2(MAX_SEG),
  localparam int unsigned AW         = $clog2(NUM_CLASSES * MAX_SEG),
  localparam int unsigned FW         = $clog2(FB_ROWS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host buffer access
  input  logic                 wr_en,
  input  logic [1:0]           wr_buf,
  input  logic [8:0]           wr_addr,
  input  logic [31:0]          wr_data,
  input  logic [1:0]           rd_buf,
  input  logic [8:0]           rd_addr,
  output logic [31:0]          rd_data,
  // single-feature writes from the feature extractor path
  input  logic                 fe_we,
  input  logic [FW+2:0]        fe_idx,
  input  logic [7:0]           fe_data,
  // configuration
  input  logic [3:0]           cfg_f1c,
  input  logic [4:0]           cfg_f2c,
  input  logic [SW:0]          cfg_nseg,
  input  logic [CW:0]          cfg_ncls,
  input  logic [3:0]           cfg_prec,
  input  logic [15:0]          cfg_th,
  input  logic                 cfg_prog,   // progressive search enable
  input  logic                 cfg_raw,    // input buffer holds an encoded HV
  // commands
  input  logic                 start_infer,
  input  logic                 start_train,
  input  logic [CW-1:0]        train_label,
  input  logic                 start_clear,
  output logic                 busy,
  output logic                 done,
  output logic [CW-1:0]        result_cls,
  output logic [31:0]          result_margin,
  output logic [SW:0]          segs_used,
  output logic                 early_exit
);
  // ---------------- input buffer ----------------
  logic [63:0]   inbuf [FB_ROWS];
  logic [FW-1:0] fb_raddr, enc_fb_raddr;
  logic [63:0]   fb_rdata;

  always_ff @(posedge clk) begin
    if (wr_en && wr_buf == 2'd0) inbuf[wr_addr[FW:1]][{wr_addr[0], 5'b0} +: 32] <= wr_data;
    if (fe_we) inbuf[fe_idx[FW+2:3]][{fe_idx[2:0], 3'b0} +: 8] <= fe_data;
    fb_rdata <= inbuf[fb_raddr];
  end

  // ---------------- sequencer state ----------------
  typedef enum logic [3:0] {
    H_IDLE, H_PRE, H_PRE_WAIT, H_SEG, H_SEG_WAIT, H_RAW, H_RAW_WAIT,
    H_SEARCH, H_SEARCH_WAIT, H_TRAIN, H_TRAIN_WAIT, H_CLEAR, H_DONE
  } hstate_e;
  hstate_e state;
  logic          is_train;
  logic [SW:0]   s_cnt;
  logic [63:0]   qseg;
  logic [CW-1:0] label_q, class_sel;
  logic [1:0]    seg_page;
  logic [AW:0]   clr_cnt;

  // ---------------- encoder ----------------
  logic        enc_start_pre, enc_start_seg, enc_busy, enc_valid;
  logic [63:0] enc_bits;
  logic [31:0] wb_rdata;

  kron_encoder #(
    .F1_MAX(F1_MAX), .F2C_MAX(F2C_MAX), .MAX_SEG(MAX_SEG), .FB_ROWS(FB_ROWS)
  ) u_enc (
    .clk, .rst_n,
    .wb_we    (wr_en && wr_buf == 2'd1),
    .wb_addr  (wr_addr),
    .wb_data  (wr_data),
    .wb_raddr (rd_addr),
    .wb_rdata (wb_rdata),
    .cfg_f1c  (cfg_f1c[$clog2(F1_MAX/8+1)-1:0]),
    .cfg_f2c  (cfg_f2c[$clog2(F2C_MAX+1)-1:0]),
    .start_pre(enc_start_pre),
    .start_seg(enc_start_seg),
    .seg_idx  (s_cnt[SW-1:0]),
    .busy     (enc_busy),
    .seg_valid(enc_valid),
    .seg_bits (enc_bits),
    .fb_raddr (enc_fb_raddr),
    .fb_rdata (fb_rdata)
  );

  always_comb begin
    if (state == H_RAW)       fb_raddr = FW'(s_cnt);
    else if (state == H_IDLE) fb_raddr = rd_addr[FW:1];
    else                      fb_raddr = enc_fb_raddr;
  end

  // ---------------- CHV cache and its users ----------------
  logic [AW-1:0]        c_raddr, s_raddr, t_raddr, t_waddr, c_waddr;
  logic [64*CHV_W-1:0]  c_rdata, t_wdata, c_wdata;
  logic [64*CHV_W/32-1:0] c_wmask;
  logic                 c_we, t_we;
  logic                 s_start, s_done, s_term, t_start, t_done;
  logic [CW-1:0]        s_best;
  logic signed [31:0]   s_bdist;
  logic [31:0]          s_margin;
  logic [AW-1:0]        host_addr;

  assign host_addr = AW'(class_sel) * AW'(MAX_SEG) + AW'({seg_page, rd_addr[8:4]} % MAX_SEG);

  chv_cache #(.NUM_CLASSES(NUM_CLASSES), .MAX_SEG(MAX_SEG), .CHV_W(CHV_W)) u_chv (
    .clk, .raddr(c_raddr), .rdata(c_rdata),
    .we(c_we), .waddr(c_waddr), .wmask(c_wmask), .wdata(c_wdata)
  );

  hd_search #(.NUM_CLASSES(NUM_CLASSES), .MAX_SEG(MAX_SEG), .CHV_W(CHV_W)) u_search (
    .clk, .rst_n,
    .start(s_start), .first_seg(s_cnt == '0), .qseg(qseg), .seg(s_cnt[SW-1:0]),
    .n_cls(cfg_ncls), .prec(cfg_prec), .th(cfg_th),
    .chv_raddr(s_raddr), .chv_rdata(c_rdata),
    .done(s_done), .best_cls(s_best), .best_dist(s_bdist), .margin(s_margin), .terminate(s_term)
  );

  hd_train #(.NUM_CLASSES(NUM_CLASSES), .MAX_SEG(MAX_SEG), .CHV_W(CHV_W)) u_train (
    .clk, .rst_n,
    .start(t_start), .qseg(qseg), .seg(s_cnt[SW-1:0]), .label(label_q),
    .chv_raddr(t_raddr), .chv_rdata(c_rdata),
    .chv_we(t_we), .chv_waddr(t_waddr), .chv_wdata(t_wdata), .done(t_done)
  );

  always_comb begin
    c_raddr = host_addr;
    if (state == H_SEARCH || state == H_SEARCH_WAIT) c_raddr = s_raddr;
    else if (state == H_TRAIN || state == H_TRAIN_WAIT) c_raddr = t_raddr;
    c_we    = 1'b0;
    c_waddr = t_waddr;
    c_wmask = '1;
    c_wdata = t_wdata;
    if (t_we) begin
      c_we = 1'b1;
    end else if (state == H_CLEAR) begin
      c_we    = 1'b1;
      c_waddr = clr_cnt[AW-1:0];
      c_wdata = '0;
    end else if (wr_en && wr_buf == 2'd2 && state == H_IDLE) begin
      c_we    = 1'b1;
      c_waddr = AW'(class_sel) * AW'(MAX_SEG) + AW'({seg_page, wr_addr[8:4]} % MAX_SEG);
      c_wmask = (64*CHV_W/32)'(1) << wr_addr[3:0];
      c_wdata = {(64*CHV_W/32){wr_data}};
    end
  end

  // host reads
  logic [1:0] rd_buf_q;
  logic [3:0] rd_part_q;
  logic       rd_half_q;
  always_ff @(posedge clk) begin
    rd_buf_q  <= rd_buf;
    rd_part_q <= rd_addr[3:0];
    rd_half_q <= rd_addr[0];
  end
  always_comb begin
    unique case (rd_buf_q)
      2'd0:    rd_data = rd_half_q ? fb_rdata[63:32] : fb_rdata[31:0];
      2'd1:    rd_data = wb_rdata;
      2'd2:    rd_data = c_rdata[32*rd_part_q +: 32];
      default: rd_data = 32'(class_sel) | (32'(seg_page) << 8);
    endcase
  end

  // ---------------- sequencer ----------------
  assign enc_start_pre = (state == H_PRE);
  assign enc_start_seg = (state == H_SEG);
  assign s_start       = (state == H_SEARCH);
  assign t_start       = (state == H_TRAIN);
  assign busy          = (state != H_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= H_IDLE; is_train <= 1'b0; s_cnt <= '0; qseg <= '0; label_q <= '0;
      class_sel <= '0; seg_page <= '0; clr_cnt <= '0; done <= 1'b0;
      result_cls <= '0; result_margin <= '0; segs_used <= '0; early_exit <= 1'b0;
    end else begin
      done <= 1'b0;
      if (wr_en && wr_buf == 2'd3) begin
        class_sel <= wr_data[CW-1:0];
        seg_page  <= wr_data[9:8];
      end
      unique case (state)
        H_IDLE: begin
          s_cnt <= '0;
          if (start_clear) begin
            state <= H_CLEAR; clr_cnt <= '0;
          end else if (start_infer || start_train) begin
            is_train <= start_train;
            label_q  <= train_label;
            state    <= cfg_raw ? H_RAW : H_PRE;
          end
        end
        H_PRE:      state <= H_PRE_WAIT;
        H_PRE_WAIT: if (!enc_busy) state <= H_SEG;
        H_SEG:      state <= H_SEG_WAIT;
        H_SEG_WAIT: if (enc_valid) begin
                      qseg  <= enc_bits;
                      state <= is_train ? H_TRAIN : H_SEARCH;
                    end
        H_RAW:      state <= H_RAW_WAIT;
        H_RAW_WAIT: begin
                      qseg  <= fb_rdata;
                      state <= is_train ? H_TRAIN : H_SEARCH;
                    end
        H_SEARCH:   state <= H_SEARCH_WAIT;
        H_SEARCH_WAIT: if (s_done) begin
                      result_cls    <= s_best;
                      result_margin <= s_margin;
                      if ((cfg_prog && s_term) || s_cnt == cfg_nseg - 1'b1) begin
                        early_exit <= cfg_prog && s_term && (s_cnt != cfg_nseg - 1'b1);
                        segs_used  <= s_cnt + 1'b1;
                        state      <= H_DONE;
                      end else begin
                        s_cnt <= s_cnt + 1'b1;
                        state <= cfg_raw ? H_RAW : H_SEG;
                      end
                    end
        H_TRAIN:    state <= H_TRAIN_WAIT;
        H_TRAIN_WAIT: if (t_done) begin
                      if (s_cnt == cfg_nseg - 1'b1) begin
                        segs_used  <= s_cnt + 1'b1;
                        early_exit <= 1'b0;
                        state      <= H_DONE;
                      end else begin
                        s_cnt <= s_cnt + 1'b1;
                        state <= cfg_raw ? H_RAW : H_SEG;
                      end
                    end
        H_CLEAR: begin
                   clr_cnt <= clr_cnt + 1'b1;
                   if (clr_cnt == (AW+1)'(NUM_CLASSES * MAX_SEG - 1)) state <= H_DONE;
                 end
        H_DONE: begin
                  done  <= 1'b1;
                  state <= H_IDLE;
                end
        default: state <= H_IDLE;
      endcase
    end
  end

endmodule
