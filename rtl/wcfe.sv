// wcfe: weight clustering feature extractor (WCFE) with a 4 x 16 PE array.
//
// The array computes a clustered matrix-vector product: the 4 PE rows take
// 4 input vectors (for a convolution, 4 flattened input patches) from the
// activation memory, and the 16 PE columns are 16 output channels, each with
// its own centroid index per input position (index memory) and its own K
// centroid weights (weight memory). Every activation is broadcast along its
// row; every index along its column. After N merge cycles the array runs K
// multiply cycles and writes the 64 BF16 results into the output feature
// buffer. The 4 x 16 array, the three memories, the output feature buffer and
// the merge-then-multiply dataflow follow the document; the memory sizes,
// layouts and the sequencing are this design's own choices.
//
// Host-side word access (32-bit words, write and 1-cycle-latency read):
//   buf 0 activation memory : see the activation layout below
//   buf 1 index memory      : word w -> input i = w/2, columns 8*(w%2)..+7
//   buf 2 weight memory     : word w -> centroid w/8, columns 2*(w%8), +1
//   buf 3 output buffer     : word w -> PE row w/8, columns 2*(w%8), +1 (read)
// Activation layout: word w -> PE row w / (N_MAX/2), inputs 2*(w % (N_MAX/2)), +1.
// Low half-word is the even element / even column.
//
// Timing: start (one cycle, while idle) -> busy for N + K + 3 cycles -> done
// pulses one cycle with the output buffer updated.
module wcfe #(
  parameter int unsigned N_MAX = 1024,  // inputs per vector
  parameter int unsigned K     = 16,    // centroids per output channel
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host buffer access
  input  logic                       wr_en,
  input  logic [1:0]                 wr_buf,
  input  logic [12:0]                wr_addr,
  input  logic [31:0]                wr_data,
  input  logic [1:0]                 rd_buf,
  input  logic [12:0]                rd_addr,
  output logic [31:0]                rd_data,
  // layer control
  input  logic [$clog2(N_MAX+1)-1:0] cfg_n,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  // output features for the HD module (combinational read)
  input  logic [$clog2(ROWS*COLS)-1:0] feat_idx,
  output logic [15:0]                feat
);
  localparam int unsigned KW  = $clog2(K);
  localparam int unsigned NW  = $clog2(N_MAX);
  localparam int unsigned HALF = N_MAX / 2;

  logic [15:0]        act_mem [ROWS][N_MAX];
  logic [KW*COLS-1:0] idx_mem [N_MAX];
  logic [16*COLS-1:0] wgt_mem [K];
  logic [15:0]        out_buf [ROWS*COLS];

  // ---------------- host writes ----------------
  always_ff @(posedge clk) begin
    if (wr_en) begin
      unique case (wr_buf)
        2'd0: begin
          act_mem[wr_addr / HALF][2*(wr_addr % HALF)]   <= wr_data[15:0];
          act_mem[wr_addr / HALF][2*(wr_addr % HALF)+1] <= wr_data[31:16];
        end
        2'd1: idx_mem[wr_addr[NW:1]][{wr_addr[0], 5'b0} +: 32] <= wr_data;
        2'd2: begin
          wgt_mem[wr_addr[KW+2:3]][{wr_addr[2:0], 5'b0} +: 32] <= wr_data;
        end
        default: ;
      endcase
    end
  end

  // ---------------- host reads (registered) ----------------
  always_ff @(posedge clk) begin
    unique case (rd_buf)
      2'd0: rd_data <= {act_mem[rd_addr / HALF][2*(rd_addr % HALF)+1],
                        act_mem[rd_addr / HALF][2*(rd_addr % HALF)]};
      2'd1: rd_data <= idx_mem[rd_addr[NW:1]][{rd_addr[0], 5'b0} +: 32];
      2'd2: rd_data <= wgt_mem[rd_addr[KW+2:3]][{rd_addr[2:0], 5'b0} +: 32];
      default: rd_data <= {out_buf[2*rd_addr[5:0]+1], out_buf[2*rd_addr[5:0]]};
    endcase
  end

  assign feat = out_buf[feat_idx];

  // ---------------- sequencer ----------------
  typedef enum logic [2:0] {S_IDLE, S_CLR, S_MERGE, S_MAC, S_DRAIN, S_STORE} state_e;
  state_e state;
  logic [NW:0]  i_cnt;
  logic [KW:0]  k_cnt;
  logic         merge_q, mac_q;
  logic [15:0]  act_q [ROWS];
  logic [KW*COLS-1:0] idx_q;
  logic [16*COLS-1:0] wgt_q;
  logic [KW-1:0] mac_k_q;
  logic [15:0]  pe_y [ROWS][COLS];

  // Synchronous memory reads feeding the array (one-cycle latency).
  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++) act_q[r] <= act_mem[r][i_cnt[NW-1:0]];
    idx_q   <= idx_mem[i_cnt[NW-1:0]];
    wgt_q   <= wgt_mem[k_cnt[KW-1:0]];
    mac_k_q <= k_cnt[KW-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      i_cnt   <= '0;
      k_cnt   <= '0;
      merge_q <= 1'b0;
      mac_q   <= 1'b0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      merge_q <= (state == S_MERGE);
      mac_q   <= (state == S_MAC);
      unique case (state)
        S_IDLE:  if (start) begin
                   state <= S_CLR;
                   i_cnt <= '0;
                   k_cnt <= '0;
                 end
        S_CLR:   state <= (cfg_n == 0) ? S_MAC : S_MERGE;
        S_MERGE: begin
                   i_cnt <= i_cnt + 1'b1;
                   if (i_cnt + 1'b1 == (NW+1)'(cfg_n)) state <= S_MAC;
                 end
        S_MAC:   begin
                   k_cnt <= k_cnt + 1'b1;
                   if (k_cnt == (KW+1)'(K - 1)) state <= S_DRAIN;
                 end
        S_DRAIN: state <= S_STORE;
        S_STORE: begin
                   state <= S_IDLE;
                   done  <= 1'b1;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (state == S_STORE)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) out_buf[r*COLS + c] <= pe_y[r][c];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      wcfe_pe #(.K(K)) u_pe (
        .clk, .rst_n,
        .clr      (state == S_CLR),
        .merge_en (merge_q),
        .act      (act_q[r]),
        .idx      (idx_q[KW*c +: KW]),
        .mac_en   (mac_q),
        .mac_k    (mac_k_q),
        .w        (wgt_q[16*c +: 16]),
        .y        (pe_y[r][c])
      );
    end
  end

endmodule
