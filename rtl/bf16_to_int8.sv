// bf16_to_int8: converts a bfloat16 feature from the feature extractor into
// the signed 8-bit feature the HD encoder takes, scaled by 2**shift.
//
// y = saturate_int8(trunc(x * 2**shift)), rounding toward zero, shift a
// signed power-of-two scale in [-16, 15]. The document gives BF16 for the
// feature extractor and INT1-8 for the HD side but not the conversion; this
// scaling and truncation are this design's own choice. Combinational.
module bf16_to_int8 (
  input  logic [15:0]       x,
  input  logic signed [4:0] shift,
  output logic [7:0]        y
);
  logic signed [9:0] e;
  logic [7:0]        mag;

  always_comb begin
    e   = $signed({2'b0, x[14:7]}) - 10'sd127 + 10'(shift);
    mag = 8'd0;
    if (x[14:7] == 8'd0 || e < 0) mag = 8'd0;
    else if (e >= 10'sd7)         mag = 8'd128;  // saturate
    else                          mag = {1'b1, x[6:0]} >> (7 - e[2:0]);
    if (x[15]) y = 8'(-$signed({1'b0, mag}));
    else       y = (mag == 8'd128) ? 8'd127 : mag;
  end
endmodule
