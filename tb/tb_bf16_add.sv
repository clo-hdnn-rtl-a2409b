// tb_bf16_add: self-checking test of the bfloat16 adder and multiplier.
// Random operands (exponents kept within a range where a double holds the
// exact result) are combined in double precision, rounded to bfloat16 with
// round-to-nearest-even by an independent model, and compared bit for bit.
// Directed cases cover exact cancellation, zero operands and overflow.
module tb_bf16_add;
  import bf16_ref_pkg::*;
  logic [15:0] a, b, ys, yp;
  int checks = 0, failures = 0;

  bf16_add u_add (.a(a), .b(b), .y(ys));
  bf16_mul u_mul (.a(a), .b(b), .y(yp));

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      a = {1'($urandom), 8'(110 + $urandom_range(0, 40)), 7'($urandom)};
      b = {1'($urandom), 8'(110 + $urandom_range(0, 40)), 7'($urandom)};
      if (i % 7 == 0) b = {~a[15], a[14:7], 7'($urandom)};  // near cancellation
      #1;
      check(ys, r2bf(bf2r(a) + bf2r(b)), "add");
      check(yp, r2bf(bf2r(a) * bf2r(b)), "mul");
    end
    a = 16'h3F80; b = 16'hBF80; #1; check(ys, 16'h0000, "cancel");
    a = 16'h4040; b = 16'h0000; #1; check(ys, 16'h4040, "add zero"); check(yp, 16'h0000, "mul zero");
    a = 16'h7F00; b = 16'h7F00; #1; check(ys, 16'h7F80, "add ovf"); check(yp, 16'h7F80, "mul ovf");
    a = 16'h3FC0; b = 16'h4000; #1; check(ys, 16'h4060, "1.5+2"); check(yp, 16'h4040, "1.5*2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
