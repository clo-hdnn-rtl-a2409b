// bf16_add: combinational bfloat16 adder used by the WCFE processing elements
// to merge activations that share a weight cluster and to sum the cluster
// products.
//
// The larger-magnitude operand is kept, the smaller one is aligned with a
// sticky bit below its last kept bit, the two are added or subtracted,
// normalised by a leading-one search and rounded to nearest, ties to even.
// Subnormal inputs are read as zero, results below the normal range flush to
// zero, results above it saturate to infinity. An exact zero sum is +0.
// BF16 comes from the chip's precision; the arithmetic details are this
// design's own choice.
module bf16_add (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y
);
  logic [15:0] larger, lesser;
  logic        a_zero, b_zero, sub;
  logic [7:0]  d;
  logic [23:0] sm_full, sm_shift;
  logic        sm_sticky;
  logic [25:0] sum, norm;
  logic [4:0]  lead;
  logic signed [10:0] exp_s;
  logic [6:0]  mant;
  logic        guard, sticky, rnd;
  logic [15:0] rounded;

  always_comb begin
    a_zero = (a[14:7] == 8'd0);
    b_zero = (b[14:7] == 8'd0);
    if (a[14:0] >= b[14:0]) begin
      larger = a; lesser = b;
    end else begin
      larger = b; lesser = a;
    end
    sub      = larger[15] ^ lesser[15];
    d        = larger[14:7] - lesser[14:7];
    sm_full  = {1'b1, lesser[6:0], 16'd0};
    if (d >= 8'd24) begin
      sm_shift  = 24'd0;
      sm_sticky = 1'b1;
    end else begin
      sm_shift  = sm_full >> d;
      sm_sticky = |(sm_full & ((24'd1 << d) - 24'd1));
    end
    if (sub) sum = {1'b0, 1'b1, larger[6:0], 16'd0, 1'b0} - {1'b0, sm_shift, sm_sticky};
    else     sum = {1'b0, 1'b1, larger[6:0], 16'd0, 1'b0} + {1'b0, sm_shift, sm_sticky};
    lead = 5'd0;
    for (int i = 0; i < 26; i++) if (sum[i]) lead = 5'(i);
    norm    = sum << (5'd25 - lead);
    exp_s   = $signed({3'b0, larger[14:7]}) + $signed({6'b0, lead}) - 11'sd24;
    mant    = norm[24:18];
    guard   = norm[17];
    sticky  = |norm[16:0];
    rnd     = guard & (sticky | mant[0]);
    rounded = {1'b0, exp_s[7:0], mant} + {15'b0, rnd};
    if (a_zero && b_zero) y = 16'd0;
    else if (b_zero)      y = a;
    else if (a_zero)      y = b;
    else if (sum == 26'd0 || exp_s <= 11'sd0) y = 16'd0;
    else if (exp_s >= 11'sd255 || rounded[14:7] == 8'hFF) y = {larger[15], 8'hFF, 7'd0};
    else y = {larger[15], rounded[14:0]};
  end
endmodule
