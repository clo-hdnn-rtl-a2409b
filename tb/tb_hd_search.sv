// tb_hd_search: checks the partial-distance search. A memory model holds
// random INT8 class segments; several queries of several segments each are
// searched with precisions 1, 4 and 8 bits. After each segment the best
// class, the margin to the runner-up and the early-termination flag are
// compared with distances the testbench accumulates itself (elements reduced
// by floor division, sign for 1 bit). The latency must be n_cls + 2 cycles.
module tb_hd_search;
  localparam int NC = 128, MS = 128, W = 8;
  logic clk = 0, rst_n = 0, start = 0, first_seg = 0, done, terminate;
  logic [63:0] qseg = 0;
  logic [6:0] seg = 0;
  logic [7:0] n_cls = 0;
  logic [3:0] prec = 8;
  logic [15:0] th = 0;
  logic [13:0] chv_raddr;
  logic [511:0] chv_rdata;
  logic [6:0] best_cls;
  logic signed [31:0] best_dist;
  logic [31:0] margin;
  int checks = 0, failures = 0;
  logic [511:0] mem [NC*MS];
  int edist [NC];
  int terms = 0;

  hd_search dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) chv_rdata <= mem[chv_raddr];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int reduce(input logic signed [7:0] e, input int p);
    if (p == 1) return (e < 0) ? -1 : 1;
    return int'($floor(real'(e) / real'(1 << (8 - p))));
  endfunction

  initial begin
    for (int i = 0; i < NC*MS; i++) for (int k = 0; k < 16; k++) mem[i][32*k +: 32] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int qn = 0; qn < 12; qn++) begin
      int nc, p, cyc, b, m1, m2;
      nc = (qn == 0) ? NC : $urandom_range(2, 40);
      p  = (qn % 3 == 0) ? 1 : ((qn % 3 == 1) ? 4 : 8);
      n_cls = 8'(nc); prec = 4'(p); th = 16'($urandom_range(0, 200));
      for (int s = 0; s < 4; s++) begin
        qseg = {$urandom, $urandom}; seg = 7'($urandom); first_seg = (s == 0);
        for (int c = 0; c < nc; c++) begin
          if (s == 0) edist[c] = 0;
          for (int k = 0; k < 64; k++) begin
            int r;
            r = reduce(mem[c*MS + seg][8*k +: 8], p);
            edist[c] += qseg[k] ? -r : r;
          end
        end
        b = 0;
        for (int c = 1; c < nc; c++) if (edist[c] < edist[b]) b = c;
        m2 = 32'h7fffffff;
        for (int c = 0; c < nc; c++) if (c != b && edist[c] < m2) m2 = edist[c];
        m1 = edist[b];
        start = 1; @(negedge clk); start = 0;
        cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
        checks += 4;
        if (cyc != nc + 2) begin failures++; $display("FAIL cycles %0d nc %0d", cyc, nc); end
        if (best_dist != m1) begin failures++; $display("FAIL best dist %0d exp %0d", best_dist, m1); end
        if (margin != 32'(m2 - m1)) begin failures++; $display("FAIL margin %0d exp %0d", margin, m2 - m1); end
        if (terminate != ((m2 - m1) > int'(th))) begin failures++; $display("FAIL terminate"); end
        if (edist[best_cls] != m1) begin failures++; checks++; $display("FAIL best class %0d", best_cls); end
        if (terminate) terms++;
      end
    end
    checks++;
    if (terms == 0) begin failures++; $display("FAIL no early termination seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
