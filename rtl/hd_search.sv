// hd_search: partial distance search and confidence check of progressive HD
// search.
//
// For each query segment (64 bipolar bits) the unit walks over the active
// classes, one per cycle, fetches that class's CHV segment from the cache and
// adds the partial distance
//     d = sum over k of -(q_k * c_k),  q_k = +1 if bit k is 1, else -1,
// to the class's running distance (cleared on the first segment). c_k is the
// stored INT8 element reduced to the inference precision: its top PREC bits
// (arithmetic shift), or for PREC = 1 its sign as +1/-1. As distances
// complete it keeps the smallest and second smallest; after the last class it
// reports the best class and the margin (second - best). terminate is set
// when the margin exceeds the threshold Th, which lets the controller stop
// encoding further segments. Partial distances, the margin against Th and the
// early stop follow the document; the distance formula and the precision
// reduction are this design's own choices.
//
// Timing: start -> n_cls + 2 cycles -> done (one-cycle pulse).
module hd_search #(
  parameter int unsigned NUM_CLASSES = 128,
  parameter int unsigned MAX_SEG     = 128,
  parameter int unsigned CHV_W       = 8,
  localparam int unsigned CW         = $clog2(NUM_CLASSES),
  localparam int unsigned SW         = $clog2(MAX_SEG),
  localparam int unsigned AW         = $clog2(NUM_CLASSES * MAX_SEG)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 first_seg,
  input  logic [63:0]          qseg,
  input  logic [SW-1:0]        seg,
  input  logic [CW:0]          n_cls,     // 2 .. NUM_CLASSES
  input  logic [3:0]           prec,      // 1 .. CHV_W
  input  logic [15:0]          th,
  // CHV cache read port
  output logic [AW-1:0]        chv_raddr,
  input  logic [64*CHV_W-1:0]  chv_rdata,
  // result
  output logic                 done,
  output logic [CW-1:0]        best_cls,
  output logic signed [31:0]   best_dist,
  output logic [31:0]          margin,
  output logic                 terminate
);
  logic signed [31:0] cls_dist [NUM_CLASSES];
  logic               run, d_valid, d_last, first_q;
  logic [CW:0]        c_cnt;
  logic [CW-1:0]      d_cls;
  logic [63:0]        q_q;
  logic signed [31:0] part, newd;
  logic signed [31:0] m1, m2;  // smallest, second smallest
  logic [CW-1:0]      m1_cls;

  assign chv_raddr = AW'(c_cnt[CW-1:0]) * AW'(MAX_SEG) + AW'(seg);

  // partial distance of the fetched class segment
  always_comb begin
    part = '0;
    for (int k = 0; k < 64; k++) begin
      logic signed [CHV_W-1:0] e;
      logic signed [CHV_W-1:0] r;
      e = chv_rdata[CHV_W*k +: CHV_W];
      if (prec <= 4'd1) r = e[CHV_W-1] ? -CHV_W'(1) : CHV_W'(1);
      else              r = e >>> (CHV_W - 32'(prec));
      part = q_q[k] ? part - 32'(r) : part + 32'(r);
    end
    newd = (first_q ? 32'sd0 : cls_dist[d_cls]) + part;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; d_valid <= 1'b0; d_last <= 1'b0; c_cnt <= '0; d_cls <= '0;
      done <= 1'b0; first_q <= 1'b0; q_q <= '0;
      m1 <= '0; m2 <= '0; m1_cls <= '0;
      best_cls <= '0; best_dist <= '0; margin <= '0; terminate <= 1'b0;
    end else begin
      done    <= 1'b0;
      d_valid <= run;
      d_last  <= run && (c_cnt == n_cls - 1'b1);
      d_cls   <= c_cnt[CW-1:0];
      if (start && !run) begin
        run     <= 1'b1;
        c_cnt   <= '0;
        q_q     <= qseg;
        first_q <= first_seg;
        m1      <= 32'sh7fffffff;
        m2      <= 32'sh7fffffff;
      end else if (run) begin
        c_cnt <= c_cnt + 1'b1;
        if (c_cnt == n_cls - 1'b1) run <= 1'b0;
      end
      if (d_valid) begin
        cls_dist[d_cls] <= newd;
        if (newd < m1) begin
          m2 <= m1; m1 <= newd; m1_cls <= d_cls;
        end else if (newd < m2) begin
          m2 <= newd;
        end
        if (d_last) begin
          done      <= 1'b1;
          if (newd < m1) begin
            best_cls  <= d_cls;
            best_dist <= newd;
            margin    <= 32'(m1 - newd);
            terminate <= (m1 - newd) > 32'(th);
          end else begin
            best_cls  <= m1_cls;
            best_dist <= m1;
            margin    <= (newd < m2) ? 32'(newd - m1) : 32'(m2 - m1);
            terminate <= ((newd < m2) ? (newd - m1) : (m2 - m1)) > 32'(th);
          end
        end
      end
    end
  end
endmodule
