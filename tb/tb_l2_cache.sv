// tb_l2_cache: the L2 cache array with 2 ways, 4 lines of 32 bytes.
// Checks: an empty cache misses; the victim is the lowest empty way, and the
// random number picks it once the set is full; filled words read back per
// way; another line index is independent; a byte-strobed write changes only
// its bytes; a fill in progress (valid cleared at fill_start) misses; flush
// empties every line.
`timescale 1ns/1ps
module tb_l2_cache;
  localparam int NB = 2, LC = 4, LB = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        lk_en = 0, lk_hit;
  logic [31:0] lk_addr = '0;
  logic [0:0]  lk_way, lk_victim, fill_way = '0, wr_way = '0, lk_pend_way = '0;
  logic        lk_pend = 0;
  logic [63:0] lk_rdata, rnd = '0, fill_data = '0, wr_data = '0;
  logic        fill_start = 0, fill_we = 0, fill_done = 0, wr_en = 0, flush = 0;
  logic [31:0] fill_addr = '0, wr_addr = '0;
  logic [1:0]  fill_word = '0;
  logic [7:0]  wr_strb = '0;

  l2_cache #(.NUM_BLOCKS(NB), .LINE_COUNT(LC), .LINE_BYTES(LB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [63:0] pat(input logic [31:0] a, input int way);
    return {a ^ 32'hC0DE_0000, a ^ 32'(way)};
  endfunction
  task automatic lookup(input logic [31:0] a);
    @(negedge clk); lk_en = 1; lk_addr = a;
    @(negedge clk); lk_en = 0;
  endtask
  task automatic fill(input logic [31:0] a, input int way, input bit finish);
    @(negedge clk); fill_start = 1; fill_addr = a; fill_way = way[0];
    @(negedge clk); fill_start = 0;
    for (int w = 0; w < 4; w++) begin
      fill_we = 1; fill_word = w[1:0]; fill_data = pat({a[31:5], w[1:0], 3'b0}, way);
      @(negedge clk);
    end
    fill_we = 0;
    if (finish) begin fill_done = 1; @(negedge clk); fill_done = 0; end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    lookup(32'h1000);
    check(!lk_hit && lk_victim == 0, "empty: miss, victim way 0");
    fill(32'h1000, 0, 1);
    lookup(32'h2000);
    check(!lk_hit && lk_victim == 1, "victim is the empty way 1");
    fill(32'h2000, 1, 1);
    for (int w = 0; w < 4; w++) begin
      lookup(32'h1000 + 8 * w);
      check(lk_hit && lk_way == 0 && lk_rdata == pat(32'h1000 + 8 * w, 0), $sformatf("way 0 word %0d", w));
      lookup(32'h2000 + 8 * w + 4);
      check(lk_hit && lk_way == 1 && lk_rdata == pat(32'h2000 + 8 * w, 1), $sformatf("way 1 word %0d", w));
    end
    rnd = 64'd7; lookup(32'h3000);
    check(!lk_hit && lk_victim == 1, "full set: victim from random (odd)");
    rnd = 64'd8; lookup(32'h3000);
    check(!lk_hit && lk_victim == 0, "full set: victim from random (even)");
    lookup(32'h1020);
    check(!lk_hit && lk_victim == 0, "other line index empty");
    @(negedge clk); wr_en = 1; wr_addr = 32'h2008; wr_way = 1; wr_data = 64'hFFEE_DDCC_BBAA_9988; wr_strb = 8'b0011_0000;
    @(negedge clk); wr_en = 0;
    lookup(32'h2008);
    check(lk_hit && lk_rdata == {pat(32'h2008, 1)[63:48], 16'hDDCC, pat(32'h2008, 1)[31:0]}, "strobed write");
    fill(32'h1000, 0, 0);
    lookup(32'h1000);
    check(!lk_hit, "line being filled is not valid");
    @(negedge clk); fill_done = 1; @(negedge clk); fill_done = 0;
    lookup(32'h1000);
    check(lk_hit, "valid after fill_done");
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    lookup(32'h1000); check(!lk_hit && lk_victim == 0, "flushed way 0");
    lookup(32'h2000); check(!lk_hit, "flushed way 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
