// cdc_fifo: dual-clock FIFO carrying words between the IO clock domain of the
// host link and the core clock domain.
//
// Classic asynchronous FIFO: binary pointers in each domain, their Gray-code
// copies passed through two-flop synchronisers into the other domain, full
// computed in the write domain and empty in the read domain. The head entry
// is visible on rdata while not empty. Each side has its own active-low reset
// (assert both together). The document names the clock-domain-crossing
// FIFOs; the Gray-pointer structure and the depth are this design's own.
module cdc_fifo #(
  parameter int unsigned W     = 37,
  parameter int unsigned DEPTH = 16
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_next, rbin_next, wgray_next, rgray_next;

  assign wbin_next  = wbin + ((push && !full) ? 1'b1 : 1'b0);
  assign wgray_next = (wbin_next >> 1) ^ wbin_next;
  assign rbin_next  = rbin + ((pop && !empty) ? 1'b1 : 1'b0);
  assign rgray_next = (rbin_next >> 1) ^ rbin_next;

  // write domain
  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      if (push && !full) mem[wbin[AW-1:0]] <= wdata;
      wbin     <= wbin_next;
      wgray    <= wgray_next;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read domain
  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= rgray_next;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];
endmodule
