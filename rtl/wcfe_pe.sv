// wcfe_pe: one processing element of the weight clustering feature extractor.
//
// The layer's weights are clustered so that every weight of an output channel
// is one of K centroid values, named by a centroid index. Instead of one
// multiply per weight, the PE first merges (adds) every activation whose
// weight carries the same index into one of K bucket registers, and then
// multiplies each bucket once by its centroid weight and sums the products.
// Merging and the single multiply per cluster follow the document; K, the
// bucket registers and the phase control are this design's own choices.
//
// Interface (one clock, active-low synchronous reset):
//   clr      clears the buckets and the accumulator
//   merge_en bucket[idx] += act, one activation per cycle (BF16)
//   mac_en   acc += bucket[mac_k] * w, one cluster per cycle (BF16)
//   y        the accumulator; valid the cycle after the last mac_en
// A layer of N inputs takes N merge cycles plus K multiply cycles.
module wcfe_pe #(
  parameter int unsigned K = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 merge_en,
  input  logic [15:0]          act,
  input  logic [$clog2(K)-1:0] idx,
  input  logic                 mac_en,
  input  logic [$clog2(K)-1:0] mac_k,
  input  logic [15:0]          w,
  output logic [15:0]          y
);
  logic [15:0] bucket [K];
  logic [15:0] merged, prod, acc_next;

  bf16_add u_merge (.a(bucket[idx]), .b(act), .y(merged));
  bf16_mul u_mul   (.a(bucket[mac_k]), .b(w), .y(prod));
  bf16_add u_acc   (.a(y), .b(prod), .y(acc_next));

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      for (int k = 0; k < K; k++) bucket[k] <= 16'd0;
      y <= 16'd0;
    end else begin
      if (merge_en) bucket[idx] <= merged;
      if (mac_en)   y <= acc_next;
    end
  end
endmodule
