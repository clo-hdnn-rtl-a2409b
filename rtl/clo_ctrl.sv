// clo_ctrl: instruction decoder and sequencer of the accelerator.
//
// It pops 37-bit words from the host link: tag 1 carries a 20-bit
// instruction, tag 0 a 32-bit data word. Memory instructions
// (STORE_BUF / READ_BUF) move 2**burst data words between the link and a
// buffer of the feature extractor (WCFE) or of the HD module, starting at
// word 8*address[8:0]; address[11:9] names the buffer. Arithmetic
// instructions configure and start the units:
//   FE_CONFIG       operand[10:0] = inputs per PE row
//   FE_INFER        run the PE array, wait until done
//   FE_LOAD         copy the 64 extracted features into the HD input buffer
//                   as INT8: operand[4:0] signed scale shift, operand[8:5]
//                   destination block of 64 features (normal mode)
//   HD_ENC_PRELOAD  operand[3:0] f1/8, [8:4] f2/8, [15:9] segments-1
//   HD_ENC_SEG      operand[13:0] threshold Th, [14] input buffer already
//                   holds an encoded HV, [15] progressive search on
//   HD_TRAIN        operand[6:0] label, [15] clear all CHVs instead
//   HD_INFER        operand[3:0] precision (1..8), [11:4] number of classes;
//                   pushes a result word {class[6:0], segments[14:7],
//                   early[15], margin[31:16] saturated}
// Results and read data leave as 34-bit words {tag, data}. In bypass mode
// the host writes features straight into the HD input buffer and no FE_*
// instruction is issued. The instruction names and the 4/16 and 4/2/2/12
// field widths follow the document; opcodes, operand fields and the word
// tags are this design's own.
module clo_ctrl
  import clo_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host link (core side)
  input  logic        in_valid,
  input  logic [36:0] in_word,
  output logic        in_pop,
  output logic        out_push,
  output logic [33:0] out_word,
  input  logic        out_full,
  // WCFE
  output logic        fe_wr_en,
  output logic [1:0]  fe_wr_buf,
  output logic [12:0] fe_wr_addr,
  output logic [31:0] fe_wr_data,
  output logic [1:0]  fe_rd_buf,
  output logic [12:0] fe_rd_addr,
  input  logic [31:0] fe_rd_data,
  output logic [10:0] fe_cfg_n,
  output logic        fe_start,
  input  logic        fe_done,
  output logic [5:0]  fe_feat_idx,
  input  logic [15:0] fe_feat,
  // HD module
  output logic        hd_wr_en,
  output logic [1:0]  hd_wr_buf,
  output logic [8:0]  hd_wr_addr,
  output logic [31:0] hd_wr_data,
  output logic [1:0]  hd_rd_buf,
  output logic [8:0]  hd_rd_addr,
  input  logic [31:0] hd_rd_data,
  output logic        hd_fe_we,
  output logic [9:0]  hd_fe_idx,
  output logic [7:0]  hd_fe_data,
  output logic [3:0]  hd_f1c,
  output logic [4:0]  hd_f2c,
  output logic [7:0]  hd_nseg,
  output logic [7:0]  hd_ncls,
  output logic [3:0]  hd_prec,
  output logic [15:0] hd_th,
  output logic        hd_prog,
  output logic        hd_raw,
  output logic        hd_start_infer,
  output logic        hd_start_train,
  output logic [6:0]  hd_label,
  output logic        hd_start_clear,
  input  logic        hd_done,
  input  logic [6:0]  hd_cls,
  input  logic [31:0] hd_margin,
  input  logic [7:0]  hd_segs,
  input  logic        hd_early
);
  typedef enum logic [3:0] {
    C_FETCH, C_STORE, C_READ, C_READ_W, C_FE_WAIT, C_FELOAD, C_HD_WAIT, C_RESULT
  } cstate_e;
  cstate_e     state;
  mem_instr_t  mi;
  logic [3:0]  cnt;
  logic [6:0]  fidx;
  logic        hd_is_infer;
  logic [4:0]  q_shift;
  logic [3:0]  q_block;

  logic [12:0] word_addr;
  assign word_addr = {1'b0, mi.addr[8:0], 3'b0} + 13'(cnt);

  // feature conversion for FE_LOAD
  logic [7:0] q_int8;
  bf16_to_int8 u_q (.x(fe_feat), .shift(q_shift), .y(q_int8));
  assign fe_feat_idx = fidx[5:0];

  logic is_instr;
  assign is_instr = (in_word[36:32] == TAG_INSTR);

  always_comb begin
    in_pop     = 1'b0;
    fe_wr_en   = 1'b0;
    hd_wr_en   = 1'b0;
    fe_wr_buf  = mi.addr[10:9];
    hd_wr_buf  = mi.addr[10:9];
    fe_wr_addr = word_addr;
    hd_wr_addr = word_addr[8:0];
    fe_wr_data = in_word[31:0];
    hd_wr_data = in_word[31:0];
    fe_rd_buf  = mi.addr[10:9];
    hd_rd_buf  = mi.addr[10:9];
    fe_rd_addr = word_addr;
    hd_rd_addr = word_addr[8:0];
    out_push   = 1'b0;
    out_word   = {OTAG_DATA, mi.src ? hd_rd_data : fe_rd_data};
    hd_fe_we   = (state == C_FELOAD);
    hd_fe_idx  = {q_block, fidx[5:0]};
    hd_fe_data = q_int8;
    unique case (state)
      C_FETCH: in_pop = in_valid;
      C_STORE: if (in_valid) begin
                 in_pop = 1'b1;
                 if (mi.dst) hd_wr_en = 1'b1;
                 else        fe_wr_en = 1'b1;
               end
      C_READ_W: if (!out_full) out_push = 1'b1;
      C_RESULT: if (!out_full) begin
                  out_push = 1'b1;
                  out_word = {OTAG_RESULT, (hd_margin > 32'hFFFF) ? 16'hFFFF : hd_margin[15:0],
                              hd_early, hd_segs, hd_cls};
                end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= C_FETCH; mi <= '0; cnt <= '0; fidx <= '0;
      fe_cfg_n <= 11'd0; fe_start <= 1'b0;
      hd_f1c <= 4'd1; hd_f2c <= 5'd1; hd_nseg <= 8'd1; hd_ncls <= 8'd2; hd_prec <= 4'd8;
      hd_th <= 16'd0; hd_prog <= 1'b0; hd_raw <= 1'b0;
      hd_start_infer <= 1'b0; hd_start_train <= 1'b0; hd_start_clear <= 1'b0; hd_label <= '0;
      hd_is_infer <= 1'b0; q_shift <= '0; q_block <= '0;
    end else begin
      fe_start       <= 1'b0;
      hd_start_infer <= 1'b0;
      hd_start_train <= 1'b0;
      hd_start_clear <= 1'b0;
      unique case (state)
        C_FETCH: if (in_valid && is_instr) begin
          mi      <= mem_instr_t'(in_word[19:0]);
              cnt     <= '0;
          unique case (opcode_e'(in_word[19:16]))
            OP_STORE_BUF:  state <= C_STORE;
            OP_READ_BUF:   state <= C_READ;
            OP_FE_CONFIG:  fe_cfg_n <= in_word[10:0];
            OP_FE_INFER:   begin fe_start <= 1'b1; state <= C_FE_WAIT; end
            OP_FE_LOAD:    begin
                             q_shift <= in_word[4:0];
                             q_block <= in_word[8:5];
                             fidx    <= '0;
                             state   <= C_FELOAD;
                           end
            OP_HD_ENC_PRELOAD: begin
                             hd_f1c  <= in_word[3:0];
                             hd_f2c  <= in_word[8:4];
                             hd_nseg <= 8'(in_word[15:9]) + 8'd1;
                           end
            OP_HD_ENC_SEG: begin
                             hd_th   <= {2'b0, in_word[13:0]};
                             hd_raw  <= in_word[14];
                             hd_prog <= in_word[15];
                           end
            OP_HD_TRAIN:   begin
                             hd_is_infer <= 1'b0;
                             if (in_word[15]) hd_start_clear <= 1'b1;
                             else begin hd_start_train <= 1'b1; hd_label <= in_word[6:0]; end
                             state <= C_HD_WAIT;
                           end
            OP_HD_INFER:   begin
                             hd_is_infer    <= 1'b1;
                             hd_prec        <= in_word[3:0];
                             hd_ncls        <= in_word[11:4];
                             hd_start_infer <= 1'b1;
                             state          <= C_HD_WAIT;
                           end
            default: ;
          endcase
        end
        C_STORE: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'((1 << mi.burst) - 1)) state <= C_FETCH;
        end
        C_READ:   state <= C_READ_W;
        C_READ_W: begin
          if (!out_full) begin
            cnt <= cnt + 1'b1;
            state <= (cnt == 4'((1 << mi.burst) - 1)) ? C_FETCH : C_READ;
          end
        end
        C_FE_WAIT: if (fe_done) state <= C_FETCH;
        C_FELOAD: begin
          fidx <= fidx + 1'b1;
          if (fidx == 7'd63) state <= C_FETCH;
        end
        C_HD_WAIT: if (hd_done) state <= hd_is_infer ? C_RESULT : C_FETCH;
        C_RESULT:  if (!out_full) state <= C_FETCH;
        default: state <= C_FETCH;
      endcase
    end
  end
endmodule
