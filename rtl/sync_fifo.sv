// sync_fifo: single-clock FIFO used for the synchronous input/output FIFOs
// between the modules and the clock-domain-crossing FIFOs.
//
// Circular buffer of DEPTH entries (power of two) with read and write
// pointers one bit wider than the address. push is ignored when full and pop
// when empty; the head entry is visible on rdata while not empty
// (first-word fall-through). The document names these FIFOs; depth and
// fall-through behaviour are this design's own choice.
module sync_fifo #(
  parameter int unsigned W     = 34,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign full  = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign empty = (wp == rp);
  assign rdata = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push && !full) begin
        mem[wp[AW-1:0]] <= wdata;
        wp <= wp + 1'b1;
      end
      if (pop && !empty) rp <= rp + 1'b1;
    end
  end

  // A push while full or a pop while empty is a protocol error of the user.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
