// hd_train: gradient-free training update of one CHV segment.
//
// Continual learning in HDC adds the encoded query to its class vector:
// CHV[label] += QHV, here one 64-dimension segment at a time, element-wise
// with saturation to the signed CHV_W-bit range (QHV bit 1 = +1, 0 = -1).
// Old classes are never touched, which is why earlier knowledge is kept.
// Bundling into the class vector follows the document; saturation, INT8
// elements and the read-modify-write sequencing are this design's own.
//
// Timing: start -> read (1 cycle) -> write-back -> done two cycles after
// start.
module hd_train #(
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
  input  logic [63:0]          qseg,
  input  logic [SW-1:0]        seg,
  input  logic [CW-1:0]        label,
  output logic [AW-1:0]        chv_raddr,
  input  logic [64*CHV_W-1:0]  chv_rdata,
  output logic                 chv_we,
  output logic [AW-1:0]        chv_waddr,
  output logic [64*CHV_W-1:0]  chv_wdata,
  output logic                 done
);
  localparam logic signed [CHV_W:0] MAXV = (CHV_W+1)'((1 << (CHV_W-1)) - 1);
  localparam logic signed [CHV_W:0] MINV = -(CHV_W+1)'(1 << (CHV_W-1));

  logic        pend;
  logic [63:0] q_q;

  assign chv_raddr = AW'(label) * AW'(MAX_SEG) + AW'(seg);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend <= 1'b0; q_q <= '0; chv_waddr <= '0; done <= 1'b0;
    end else begin
      pend <= start;
      done <= pend;
      if (start) begin
        q_q       <= qseg;
        chv_waddr <= chv_raddr;
      end
    end
  end

  assign chv_we = pend;

  always_comb begin
    for (int k = 0; k < 64; k++) begin
      logic signed [CHV_W:0] s;
      s = (CHV_W+1)'($signed(chv_rdata[CHV_W*k +: CHV_W])) + (q_q[k] ? (CHV_W+1)'(1) : -(CHV_W+1)'(1));
      if (s > MAXV)      s = MAXV;
      else if (s < MINV) s = MINV;
      chv_wdata[CHV_W*k +: CHV_W] = s[CHV_W-1:0];
    end
  end
endmodule
