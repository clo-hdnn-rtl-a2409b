// adder_tree8: signed 8-to-1 adder tree with bipolar (+1/-1) weights, the
// arithmetic unit replicated 32 times in the Kronecker HD encoder.
//
// y = sum over j of (w[j] ? +x[j] : -x[j]). Weight bit 1 means +1 and 0 means
// -1 (this encoding is this design's own choice). The sum is formed in three
// levels of two-input adders; the module is purely combinational.
module adder_tree8 #(
  parameter int unsigned IW = 16,   // input width (signed)
  parameter int unsigned OW = IW + 3
) (
  input  logic signed [IW-1:0] x [8],
  input  logic [7:0]           w,
  output logic signed [OW-1:0] y
);
  logic signed [OW-1:0] l0 [8];
  logic signed [OW-1:0] l1 [4];
  logic signed [OW-1:0] l2 [2];

  always_comb begin
    for (int j = 0; j < 8; j++) l0[j] = w[j] ? OW'(x[j]) : -OW'(x[j]);
    for (int j = 0; j < 4; j++) l1[j] = l0[2*j] + l0[2*j+1];
    for (int j = 0; j < 2; j++) l2[j] = l1[2*j] + l1[2*j+1];
    y = l2[0] + l2[1];
  end
endmodule
