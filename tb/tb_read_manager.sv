// tb_read_manager: the read manager with the L2 cache (2 ways, 8 lines of
// 32 bytes), the PRNG, the AXI4 reader and the memory model (first beat 6
// cycles after AR). The write manager is replaced by the testbench driving
// the coherence port. Checks: a hit answers in 2 cycles without AXI
// traffic; a miss answers with the first (requested) beat and the rest of
// the line arrives in the background; words of a line being filled are
// answered once they are there; replacement keeps data correct under random
// reads over more lines than fit; a coherence lookup reports hit/way and a
// coherence write updates the cached word; flush empties the cache.
`timescale 1ns/1ps
module tb_read_manager;
  import axi4_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_req = 0, rd_ack;
  logic [31:0] rd_addr = '0, rd_data;
  logic coh_lookup = 0, coh_hit, coh_write = 0, fill_active, flush_req = 0;
  logic [31:0] coh_addr = '0, coh_wr_addr = '0, fill_addr;
  logic [0:0] coh_way, coh_wr_way = '0;
  logic [63:0] coh_wr_data = '0;
  logic [7:0] coh_wr_strb = '0;

  logic c_lk_en, c_lk_hit, c_fill_start, c_fill_we, c_fill_done, c_wr_en, c_flush, prng_next;
  logic [31:0] c_lk_addr, c_fill_addr, c_wr_addr, rd_start_addr;
  logic c_lk_pend;
  logic [0:0] c_lk_way, c_lk_victim, c_fill_way, c_wr_way, c_lk_pend_way;
  logic [63:0] c_lk_rdata, c_fill_data, c_wr_data, rnd;
  logic [1:0] c_fill_word, beat_word;
  logic [7:0] c_wr_strb;
  logic rd_start, beat_valid, beat_first, beat_last;
  logic [63:0] beat_data;
  axi_req_t req;
  axi_rsp_t rsp;

  read_manager #(.NUM_BLOCKS(2), .LINE_BYTES(32)) dut (.*);
  l2_cache #(.NUM_BLOCKS(2), .LINE_COUNT(8), .LINE_BYTES(32)) u_l2 (
    .clk, .rst_n, .lk_en(c_lk_en), .lk_addr(c_lk_addr), .lk_hit(c_lk_hit), .lk_way(c_lk_way),
    .lk_rdata(c_lk_rdata), .lk_victim(c_lk_victim), .rnd,
    .lk_pend(c_lk_pend), .lk_pend_way(c_lk_pend_way),
    .fill_start(c_fill_start), .fill_addr(c_fill_addr), .fill_way(c_fill_way),
    .fill_we(c_fill_we), .fill_word(c_fill_word), .fill_data(c_fill_data), .fill_done(c_fill_done),
    .wr_en(c_wr_en), .wr_addr(c_wr_addr), .wr_way(c_wr_way), .wr_data(c_wr_data),
    .wr_strb(c_wr_strb), .flush(c_flush));
  xoroshiro128p u_prng (.clk, .rst_n, .reseed(1'b0), .seed(128'h0), .next(prng_next), .rnd);
  axi4_reader #(.LINE_BYTES(32)) u_rd (
    .clk, .rst_n, .rd_start, .rd_addr(rd_start_addr), .busy(), .mutex_busy(1'b0), .mutex_addr(32'h0),
    .beat_valid, .beat_word, .beat_data, .beat_first, .beat_last,
    .ar_addr(req.ar_addr), .ar_len(req.ar_len), .ar_size(req.ar_size), .ar_burst(req.ar_burst),
    .ar_valid(req.ar_valid), .ar_ready(rsp.ar_ready), .r_data(rsp.r_data), .r_last(rsp.r_last),
    .r_valid(rsp.r_valid), .r_ready(req.r_ready));
  assign req.aw_addr = '0; assign req.aw_len = '0; assign req.aw_size = '0;
  assign req.aw_burst = BURST_INCR; assign req.aw_valid = 1'b0;
  assign req.w_data = '0; assign req.w_strb = '0; assign req.w_last = 1'b0;
  assign req.w_valid = 1'b0; assign req.b_ready = 1'b1;
  axi4_mem_model #(.MEM_BYTES(65536), .RD_DELAY(6)) u_mem (.clk, .rst_n, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] model [16384];
  initial for (int i = 0; i < 16384; i++) model[i] = (i * 4) ^ 32'h5A5A_0000;

  task automatic read(input logic [31:0] a, output int n);
    n = 0;
    @(negedge clk); rd_req = 1; rd_addr = a;
    do begin @(posedge clk); #1; n++; end while (!rd_ack && n < 200);
    check(rd_ack && rd_data == model[a[15:2]], $sformatf("read %h = %h", a, rd_data));
    @(negedge clk); rd_req = 0;
  endtask

  initial begin
    int n, ars;
    repeat (2) @(negedge clk); rst_n = 1;
    read(32'h118, n);
    check(n > 6 && u_mem.ar_count == 1, $sformatf("miss latency %0d", n));
    read(32'h11C, n);   // same line, possibly still filling
    read(32'h100, n);
    repeat (10) @(negedge clk);
    ars = u_mem.ar_count;
    for (int w = 0; w < 8; w++) begin
      read(32'h100 + 4 * w, n);
      check(n == 1, $sformatf("hit latency %0d word %0d", n, w));
    end
    check(u_mem.ar_count == ars, "hits cause no AXI reads");
    // coherence lookup and write
    @(negedge clk); coh_lookup = 1; coh_addr = 32'h108;
    @(negedge clk); coh_lookup = 0; #1;
    check(coh_hit, "coherence lookup hit");
    coh_write = 1; coh_wr_addr = 32'h108; coh_wr_way = coh_way;
    coh_wr_data = 64'h0000_0000_1234_5678; coh_wr_strb = 8'h0F;
    @(negedge clk); coh_write = 0;
    model[32'h108 >> 2] = 32'h1234_5678;
    read(32'h108, n);
    check(n == 1, "updated word is a hit");
    @(negedge clk); coh_lookup = 1; coh_addr = 32'h4000;
    @(negedge clk); coh_lookup = 0; #1;
    check(!coh_hit, "coherence lookup miss");
    // random reads over 6 lines mapping to 2 sets
    for (int k = 0; k < 300; k++) begin
      logic [31:0] a;
      a = {18'h0, 3'($urandom_range(0, 2)), 3'b0, 1'($urandom), 7'h0} | (32'($urandom_range(0, 7)) << 2);
      read(a, n);
    end
    check(u_mem.ar_count > 10, $sformatf("replacement misses happened %0d", u_mem.ar_count));
    // flush
    read(32'h100, n);
    @(negedge clk); flush_req = 1; @(negedge clk); flush_req = 0;
    repeat (20) @(negedge clk);
    ars = u_mem.ar_count;
    read(32'h100, n);
    check(u_mem.ar_count == ars + 1 && n > 2, "flush empties the cache");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
