// kron_encoder: Kronecker HD encoder producing the query hypervector (QHV)
// 64 bits at a time, so that the distance search can start after the first
// segment and stop early.
//
// The F = f1*f2 input features are read as a matrix x[p][q] (row-major in
// the input buffer, p < f1, q < f2). The projection matrix is the Kronecker
// product of two small bipolar matrices A (f1 x NSEG) and B (f2 x 64), so
// the D = 64*NSEG dimensional encoding is
//   stage 1 (once per query):   Z[p][k]  = sum_q x[p][q] * B[q][k]
//   stage 2 (per segment s):    H[s][k]  = sum_p A[p][s] * Z[p][k]
//   QHV bit (64*s + k) = (H[s][k] >= 0)
// Only f1*NSEG + f2*64 weight bits are stored instead of F*D, and the work
// is f1*f2*64 + NSEG*f1*64 additions instead of F*D. This is the document's
// cost f2*d1*(f1+d2) with its d1 read as the 64-bit segment width.
//
// Hardware, as the document draws it: an 8-bank weight buffer of 256-bit
// register files, 32 signed 8-to-1 adder trees with bipolar weights, an input
// multiplexer that feeds the trees either the input features (stage 1) or
// intermediate results (stage 2), a parallel-in/serial-out store (PISO) for
// the intermediate matrix Z, and a serial-in/parallel-out register (SIPO)
// that gathers the 64 sign bits of a segment. Per cycle the trees take 8
// operands each: in stage 1 the same 8 features with 32 different weight
// bytes (32 columns k), in stage 2 each tree its own 8 values of Z with one
// shared weight byte. The accumulators, the PISO depth, the weight layout
// and the sequencing are this design's own choices.
//
// Weight buffer layout (row = 256 bits; byte t, bit j = weight for tree t,
// operand j; bit 1 = +1):
//   row 2*c + h              (c < f2/8, h < 2): B[8c+j][32h+t]
//   row BROW + c*SB + b      (c < f1/8, b < NSEG/32): byte s%32 of row
//                            BROW + c*SB + s/32, bit j = A[8c+j][s]
// Host writes: wb_addr[8:3] = row, wb_addr[2:0] = 32-bit part.
//
// Timing: start_pre -> busy for f1*2*(f2/8) + 2 cycles; start_seg -> busy
// for 2*(f1/8) + 2 cycles, then seg_valid pulses with seg_bits.
// Feature reads: fb_raddr = row of 8 features, fb_rdata one cycle later.
module kron_encoder #(
  parameter int unsigned F1_MAX   = 64,   // max f1 (multiple of 8)
  parameter int unsigned F2C_MAX  = 16,   // max f2/8
  parameter int unsigned MAX_SEG  = 128,  // max segments (D = 64*MAX_SEG = 8192)
  parameter int unsigned BANKS    = 8,
  parameter int unsigned BDEPTH   = 8,    // 256-bit rows per bank
  parameter int unsigned FB_ROWS  = 128   // input buffer rows of 8 features
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // weight buffer host port
  input  logic                           wb_we,
  input  logic [8:0]                     wb_addr,
  input  logic [31:0]                    wb_data,
  input  logic [8:0]                     wb_raddr,
  output logic [31:0]                    wb_rdata,
  // configuration
  input  logic [$clog2(F1_MAX/8+1)-1:0]  cfg_f1c,  // f1 / 8
  input  logic [$clog2(F2C_MAX+1)-1:0]   cfg_f2c,  // f2 / 8
  // control
  input  logic                           start_pre,
  input  logic                           start_seg,
  input  logic [$clog2(MAX_SEG)-1:0]     seg_idx,
  output logic                           busy,
  output logic                           seg_valid,
  output logic [63:0]                    seg_bits,
  // input feature buffer read port
  output logic [$clog2(FB_ROWS)-1:0]     fb_raddr,
  input  logic [63:0]                    fb_rdata
);
  localparam int unsigned TREES = 32;
  localparam int unsigned ROWS  = BANKS * BDEPTH;
  localparam int unsigned SB    = (MAX_SEG + 31) / 32;
  localparam int unsigned BROW  = 2 * F2C_MAX;
  localparam int unsigned RW    = $clog2(ROWS);
  localparam int unsigned ZW    = 16;   // stage-1 result width
  localparam int unsigned AW    = 24;   // accumulator width
  localparam int unsigned PW    = $clog2(F1_MAX);
  localparam int unsigned CW    = $clog2(F2C_MAX > F1_MAX/8 ? F2C_MAX : F1_MAX/8);

  // ---------------- 8-bank weight buffer ----------------
  logic [255:0] rf [BANKS][BDEPTH];
  logic [RW-1:0] w_row;
  logic [255:0]  w_q;

  always_ff @(posedge clk) begin
    if (wb_we) rf[wb_addr[8:3] % BANKS][wb_addr[8:3] / BANKS][{wb_addr[2:0], 5'b0} +: 32] <= wb_data;
    wb_rdata <= rf[wb_raddr[8:3] % BANKS][wb_raddr[8:3] / BANKS][{wb_raddr[2:0], 5'b0} +: 32];
    w_q      <= rf[w_row % BANKS][w_row / BANKS];
  end

  // ---------------- PISO: Z[p][k] ----------------
  logic signed [ZW-1:0] piso [F1_MAX][64];

  // ---------------- sequencer ----------------
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_SEG, S_FLUSH} state_e;
  state_e state;
  logic [PW-1:0] p_cnt;     // stage 1: row p
  logic          h_cnt;     // half of the 64 columns
  logic [CW-1:0] c_cnt;     // 8-operand chunk
  logic [$clog2(MAX_SEG)-1:0] seg_q;

  // request stage -> data stage pipeline
  logic          d_valid, d_first, d_last, d_stage2, d_h;
  logic [PW-1:0] d_p;
  logic [4:0]    d_byte;
  logic signed [ZW-1:0] z_q [TREES][8];

  logic last_c;
  assign last_c = (state == S_PRE) ? (c_cnt == CW'(cfg_f2c - 1'b1)) : (c_cnt == CW'(cfg_f1c - 1'b1));

  always_comb begin
    w_row    = '0;
    fb_raddr = '0;
    if (state == S_PRE) begin
      w_row    = RW'(2 * c_cnt + h_cnt);
      fb_raddr = ($clog2(FB_ROWS))'(p_cnt * cfg_f2c + c_cnt);
    end else if (state == S_SEG) begin
      w_row    = RW'(BROW + c_cnt * SB + seg_q / 32);
    end
  end

  always_ff @(posedge clk) begin
    for (int t = 0; t < TREES; t++)
      for (int j = 0; j < 8; j++)
        z_q[t][j] <= piso[(8*c_cnt + j) % F1_MAX][32*h_cnt + t];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      p_cnt   <= '0;
      h_cnt   <= 1'b0;
      c_cnt   <= '0;
      seg_q   <= '0;
      d_valid <= 1'b0;
      d_first <= 1'b0;
      d_last  <= 1'b0;
      d_stage2 <= 1'b0;
      d_h     <= 1'b0;
      d_p     <= '0;
      d_byte  <= '0;
    end else begin
      d_valid  <= (state == S_PRE) || (state == S_SEG);
      d_first  <= (c_cnt == '0);
      d_last   <= last_c;
      d_stage2 <= (state == S_SEG);
      d_h      <= h_cnt;
      d_p      <= p_cnt;
      d_byte   <= seg_q[4:0];
      unique case (state)
        S_IDLE: begin
          p_cnt <= '0; h_cnt <= 1'b0; c_cnt <= '0;
          if (start_pre) state <= S_PRE;
          else if (start_seg) begin
            state <= S_SEG;
            seg_q <= seg_idx;
          end
        end
        S_PRE: begin
          c_cnt <= c_cnt + 1'b1;
          if (last_c) begin
            c_cnt <= '0;
            h_cnt <= ~h_cnt;
            if (h_cnt) begin
              p_cnt <= p_cnt + 1'b1;
              if (p_cnt == PW'(8 * cfg_f1c - 1)) state <= S_FLUSH;
            end
          end
        end
        S_SEG: begin
          c_cnt <= c_cnt + 1'b1;
          if (last_c) begin
            c_cnt <= '0;
            h_cnt <= ~h_cnt;
            if (h_cnt) state <= S_FLUSH;
          end
        end
        S_FLUSH: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) || d_valid;

  // ---------------- input mux + 32 adder trees ----------------
  logic signed [ZW-1:0] tin  [TREES][8];
  logic [7:0]           twgt [TREES];
  logic signed [ZW+2:0] tsum [TREES];
  logic signed [AW-1:0] acc  [TREES];
  logic signed [AW-1:0] acc_next [TREES];

  always_comb begin
    for (int t = 0; t < TREES; t++) begin
      for (int j = 0; j < 8; j++)
        tin[t][j] = d_stage2 ? z_q[t][j] : ZW'($signed(fb_rdata[8*j +: 8]));
      twgt[t] = d_stage2 ? w_q[8*d_byte +: 8] : w_q[8*t +: 8];
    end
  end

  for (genvar t = 0; t < TREES; t++) begin : g_tree
    adder_tree8 #(.IW(ZW)) u_tree (.x(tin[t]), .w(twgt[t]), .y(tsum[t]));
    assign acc_next[t] = (d_first ? AW'(0) : acc[t]) + AW'(tsum[t]);
  end

  always_ff @(posedge clk) begin
    if (d_valid)
      for (int t = 0; t < TREES; t++) acc[t] <= acc_next[t];
    // stage 1 results go into the PISO
    if (d_valid && d_last && !d_stage2)
      for (int t = 0; t < TREES; t++) piso[d_p][32*d_h + t] <= ZW'(acc_next[t]);
  end

  // ---------------- SIPO: 64 sign bits of a segment ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seg_valid <= 1'b0;
      seg_bits  <= '0;
    end else begin
      seg_valid <= 1'b0;
      if (d_valid && d_last && d_stage2) begin
        for (int t = 0; t < TREES; t++) seg_bits[32*d_h + t] <= ~acc_next[t][AW-1];
        if (d_h) seg_valid <= 1'b1;
      end
    end
  end

endmodule
