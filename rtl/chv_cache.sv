// chv_cache: class hypervector (CHV) memory of the HD module.
//
// One word holds one 64-dimension segment of one class hypervector, 64
// signed CHV_W-bit elements, so the search can fetch exactly the part of a
// class that matches the query segment just encoded. Word address =
// class * MAX_SEG + segment. One synchronous read port (data the cycle after
// the address) and one write port with a write enable per 32-bit part, used
// both by the training unit (all parts) and by the host (one part at a time).
// Storing CHVs per segment for progressive search follows the document; the
// element width, the port structure and the layout are this design's own.
// At the defaults (128 classes, 8192 dimensions, INT8) it holds 1 MB: every
// class vector stays on chip, where the original chip keeps only part of
// them in a 32 kB cache.
module chv_cache #(
  parameter int unsigned NUM_CLASSES = 128,
  parameter int unsigned MAX_SEG     = 128,
  parameter int unsigned CHV_W       = 8,
  localparam int unsigned WW         = 64 * CHV_W,
  localparam int unsigned AW         = $clog2(NUM_CLASSES * MAX_SEG)
) (
  input  logic              clk,
  input  logic [AW-1:0]     raddr,
  output logic [WW-1:0]     rdata,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WW/32-1:0]  wmask,
  input  logic [WW-1:0]     wdata
);
  logic [WW-1:0] mem [NUM_CLASSES * MAX_SEG];

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we)
      for (int i = 0; i < WW/32; i++)
        if (wmask[i]) mem[waddr][32*i +: 32] <= wdata[32*i +: 32];
  end
endmodule
