// tb_rvex_axi_bridge: self-checking test of the rVEX-to-AXI4 bridge against
// the behavioural AXI4 memory.
//
// Checks data and the per-operation cycle counts at the bridge port (no
// delay unit in front): missing read 2 + RD_DELAY, hitting read 2, write 2,
// write to a cached word 3; a write behind a busy writer takes longer; a read
// that misses on a line with a write in flight returns the new data; a flush
// turns hits back into misses; the base address offsets every access. Then
// random reads and writes over a region 4x the cache size are compared with
// a shadow copy.
`timescale 1ns/1ps
module tb_rvex_axi_bridge;
  import rvex_bus_pkg::*;
  import axi4_pkg::*;

  localparam int unsigned RD_DELAY = 8;
  localparam int unsigned WR_DELAY = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_mst_t m_req [1];
  bus_slv_t m_rsp [1];
  logic [31:0]  base_addr = '0;
  logic         l2_flush = 1'b0, prng_reseed = 1'b0;
  logic [127:0] prng_seed = 128'h1234;
  axi_req_t     axi_req;
  axi_rsp_t     axi_rsp;

  rvex_axi_bridge #(.NUM_BLOCKS(2), .LINE_COUNT(8), .LINE_BYTES(32)) dut (
    .clk, .rst_n, .bus_req_i(m_req[0]), .bus_rsp_o(m_rsp[0]),
    .base_addr, .l2_flush, .prng_reseed, .prng_seed,
    .axi_req_o(axi_req), .axi_rsp_i(axi_rsp)
  );

  axi4_mem_model #(.MEM_BYTES(65536), .RD_DELAY(RD_DELAY), .WR_DELAY(WR_DELAY)) u_mem (
    .clk, .rst_n, .req(axi_req), .rsp(axi_rsp)
  );

  `include "tb_bus_tasks.svh"

  int checks = 0, failures = 0;
  logic [31:0] shadow [int unsigned];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] expect_word(input logic [31:0] phys);
    if (shadow.exists(phys)) return shadow[phys];
    return init_word(phys);
  endfunction

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int n;
    m_req[0] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // miss, then hit
    bus_read(0, 32'h100, d, n);
    check(d == init_word(32'h100), "miss data");
    check(n == 2 + RD_DELAY, $sformatf("miss cycles %0d", n));
    idle(8);
    bus_read(0, 32'h100, d, n);
    check(d == init_word(32'h100), "hit data");
    check(n == 2, $sformatf("hit cycles %0d", n));
    bus_read(0, 32'h11C, d, n);
    check(d == init_word(32'h11C), "hit other word of line");
    check(n == 2, $sformatf("hit cycles (last word) %0d", n));

    // read of a word of the line being filled: served once its beat is in
    bus_read(0, 32'h200, d, n);
    bus_read(0, 32'h20C, d, n);
    check(d == init_word(32'h20C), "read during fill data");
    check(n == 2, $sformatf("read of an arrived word during fill %0d", n));
    idle(8);
    bus_read(0, 32'h300, d, n);
    bus_read(0, 32'h31C, d, n);
    check(d == init_word(32'h31C), "read during fill data (last beat)");
    check(n > 2, $sformatf("read of a word not yet arrived waits %0d", n));

    // write to a cached word: 3 cycles, then a hit returns it
    idle(20);
    bus_write(0, 32'h104, 32'hDEAD_BEEF, 4'hF, n);
    shadow[32'h104] = 32'hDEAD_BEEF;
    check(n == 3, $sformatf("write hit cycles %0d", n));
    bus_read(0, 32'h104, d, n);
    check(d == 32'hDEAD_BEEF && n == 2, "read after write hit");

    // uncached write: 2 cycles; a second write waits for the writer
    idle(20);
    bus_write(0, 32'h800, 32'h1111_2222, 4'hF, n);
    shadow[32'h800] = 32'h1111_2222;
    check(n == 2, $sformatf("write miss cycles %0d", n));
    bus_write(0, 32'h900, 32'h3333_4444, 4'b0101, n);
    shadow[32'h900] = (init_word(32'h900) & 32'hFF00_FF00) | (32'h3333_4444 & 32'h00FF_00FF);
    check(n > 2, $sformatf("write behind busy writer %0d", n));
    // read of the line still being written must see the new value
    bus_read(0, 32'h904, d, n);
    bus_read(0, 32'h900, d, n);
    check(d == shadow[32'h900], "read after write (mutex)");
    idle(20);
    check(u_mem.mem[32'h800 / 8][31:0] == 32'h1111_2222, "memory holds written word");

    // flush: a former hit becomes a miss
    @(negedge clk); l2_flush = 1'b1; @(negedge clk); l2_flush = 1'b0;
    idle(3);
    bus_read(0, 32'h104, d, n);
    check(d == 32'hDEAD_BEEF, "data after flush");
    check(n == 2 + RD_DELAY, $sformatf("miss after flush %0d", n));

    // random traffic over 2 KiB (cache is 512 B)
    for (int k = 0; k < 400; k++) begin
      logic [31:0] a;
      a = {21'd0, 11'($urandom_range(0, 511) * 4)} + 32'h4000;
      if ($urandom_range(0, 2) == 0) begin
        logic [31:0] w;
        w = $urandom;
        bus_write(0, a, w, 4'hF, n);
        shadow[a] = w;
      end else begin
        bus_read(0, a, d, n);
        check(d == expect_word(a), $sformatf("random read %h got %h", a, d));
      end
      if ($urandom_range(0, 7) == 0) idle($urandom_range(1, 12));
    end

    // address translation
    idle(20);
    base_addr = 32'h0000_2000;
    bus_read(0, 32'h40, d, n);
    check(d == init_word(32'h2040), "translated read");
    bus_write(0, 32'h48, 32'hCAFE_F00D, 4'hF, n);
    idle(20);
    check(u_mem.mem[32'h2048 / 8][31:0] == 32'hCAFE_F00D, "translated write");
    check(m_rsp[0].fault == 1'b0, "no fault");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
