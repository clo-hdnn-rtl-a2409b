// bf16_ref_pkg: reference bfloat16 arithmetic for the testbenches. Values are
// widened to double, combined exactly (for the operand ranges the testbenches
// use) and rounded back to bfloat16, nearest-even, subnormals flushed to zero.
package bf16_ref_pkg;
  function automatic real bf2r(input logic [15:0] x);
    logic [63:0] d;
    if (x[14:7] == 8'd0) return 0.0;
    d = {x[15], 11'(int'(x[14:7]) - 127 + 1023), x[6:0], 45'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [15:0] r2bf(input real r);
    logic [63:0] d;
    int          e;
    logic [15:0] v;
    logic        g, s;
    d = $realtobits(r);
    if (r == 0.0) return 16'd0;
    e = int'(d[62:52]) - 1023 + 127;
    g = d[44];
    s = |d[43:0];
    v = {1'b0, 8'(e), d[51:45]};
    if (g && (s || d[45])) v = v + 16'd1;
    if (e <= 0) return 16'd0;
    if (e >= 255 || v[14:7] == 8'hFF) return {d[63], 8'hFF, 7'd0};
    return {d[63], v[14:0]};
  endfunction

  function automatic logic [15:0] bf_add(input logic [15:0] a, input logic [15:0] b);
    return r2bf(bf2r(a) + bf2r(b));
  endfunction

  function automatic logic [15:0] bf_mul(input logic [15:0] a, input logic [15:0] b);
    return r2bf(bf2r(a) * bf2r(b));
  endfunction

  // Random BF16 value with exponent in [lo, hi].
  function automatic logic [15:0] bf_rand(input int lo, input int hi);
    return {1'($urandom), 8'($urandom_range(lo, hi)), 7'($urandom)};
  endfunction
endpackage
