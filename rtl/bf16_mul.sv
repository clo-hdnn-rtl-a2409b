// bf16_mul: combinational bfloat16 multiplier used by the WCFE processing
// elements for the one multiplication per weight cluster.
//
// Format: sign[15], exponent[14:7] (bias 127), mantissa[6:0]. The 8x8-bit
// significand product is rounded to nearest, ties to even. Subnormal inputs
// are read as zero and results below the normal range flush to zero;
// results above it saturate to infinity. NaN is not produced or propagated
// specially. The chip uses BF16 for its feature extractor; the rounding and
// the subnormal policy are this design's own choice.
module bf16_mul (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y
);
  logic        sgn;
  logic [15:0] prod;
  logic [6:0]  mant;
  logic        guard, sticky, rnd;
  logic signed [10:0] exp_s;
  logic [15:0] rounded;

  always_comb begin
    sgn    = a[15] ^ b[15];
    prod   = {1'b1, a[6:0]} * {1'b1, b[6:0]};
    exp_s  = $signed({3'b0, a[14:7]}) + $signed({3'b0, b[14:7]}) - 11'sd127;
    if (prod[15]) begin
      mant   = prod[14:8];
      guard  = prod[7];
      sticky = |prod[6:0];
      exp_s  = exp_s + 11'sd1;
    end else begin
      mant   = prod[13:7];
      guard  = prod[6];
      sticky = |prod[5:0];
    end
    rnd     = guard & (sticky | mant[0]);
    rounded = {1'b0, exp_s[7:0], mant} + {15'b0, rnd};
    if (a[14:7] == 8'd0 || b[14:7] == 8'd0 || exp_s <= 11'sd0) begin
      y = {sgn, 15'd0};
    end else if (exp_s >= 11'sd255 || rounded[14:7] == 8'hFF) begin
      y = {sgn, 8'hFF, 7'd0};
    end else begin
      y = {sgn, rounded[14:0]};
    end
  end
endmodule
