// tb_rvex_mem_system: end-to-end test of the shared memory hierarchy at its
// default sizes (4 masters, 256 KiB L2 with 4 blocks of 2048 lines of 32
// bytes) against a 1 MiB behavioural AXI4 memory.
//
// Phase 1, one master at a time: cycle counts through arbiter,
// synchronization unit, demuxer and delay unit (missing read 3 + RD_DELAY,
// hitting read 3, write 3, write to a cached word 4, store-conditional one
// cycle more than a write), load-linked/store-conditional semantics (success,
// failure after another context's successful store-conditional, failure
// after a link flush, ordinary stores not breaking a link, granularity),
// control registers, L2 flush, random replacement once all four blocks of a
// set are full, and peripheral accesses routed to the upper half.
// Phase 2, all four masters at once: each adds 1 to a shared counter
// ITER times with load-linked/store-conditional retry loops while also
// writing and reading back a private region; the counter must end at
// 4*ITER. Every mechanism is counted and a failure is counted for any that
// never happened.
`timescale 1ns/1ps
module tb_rvex_mem_system;
  import rvex_bus_pkg::*;
  import axi4_pkg::*;

  localparam int unsigned NM       = 4;
  localparam int unsigned RD_DELAY = 10;
  localparam int unsigned ITER     = 40;
  localparam logic [31:0] COUNTER  = 32'h0000_1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_mst_t m_req [NM];
  bus_slv_t m_rsp [NM];
  logic [NM-1:0] link_flush = '0;
  bus_mst_t periph_req;
  bus_slv_t periph_rsp;
  logic        reg_we = 0, reg_re = 0;
  logic [4:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  axi_req_t    axi_req;
  axi_rsp_t    axi_rsp;

  rvex_mem_system dut (
    .clk, .rst_n, .mst_req(m_req), .mst_rsp(m_rsp), .link_flush,
    .periph_req, .periph_rsp,
    .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata,
    .axi_req, .axi_rsp
  );

  axi4_mem_model #(.MEM_BYTES(1 << 20), .RD_DELAY(RD_DELAY), .WR_DELAY(5)) u_mem (
    .clk, .rst_n, .req(axi_req), .rsp(axi_rsp)
  );

  // Peripheral slave: answers at once.
  int unsigned periph_count = 0;
  always_comb begin
    periph_rsp = '0;
    periph_rsp.ack = bus_req(periph_req);
    periph_rsp.read_data = periph_req.address ^ 32'hFEED_0000;
  end
  always_ff @(posedge clk) if (bus_req(periph_req)) periph_count <= periph_count + 1;

  `include "tb_bus_tasks.svh"

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic ll(input int i, input logic [31:0] a, output logic [31:0] d, output int n);
    logic f;
    bus_access(i, 1'b0, 1'b1, a, '0, '0, d, f, n);
  endtask
  task automatic sc(input int i, input logic [31:0] a, input logic [31:0] w,
                    output bit ok, output int n);
    logic [31:0] d;
    logic f;
    bus_access(i, 1'b1, 1'b1, a, w, 4'hF, d, f, n);
    ok = (d == SC_SUCCESS) && !f;
  endtask
  task automatic reg_write(input logic [4:0] a, input logic [31:0] w);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = w;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  // Mechanism counters, sampled from the design.
  int unsigned n_hit = 0, n_miss = 0, n_wr_hit = 0, n_mutex = 0, n_fill_wait = 0, n_fill_byp = 0;
  int unsigned n_contend = 0, n_random_evict = 0, n_flush = 0, n_sc_ok = 0, n_sc_fail = 0;
  int unsigned n_sc_reject_hw = 0;
  always @(posedge clk) if (rst_n) begin
    int r;
    r = 0;
    for (int i = 0; i < NM; i++) r += int'(bus_req(m_req[i]));
    if (r > 1) n_contend++;
    if (dut.u_bridge.u_rm.state_q == 2'd1 && dut.u_bridge.u_rm.c_lk_hit) n_hit++;
    if (dut.u_bridge.u_rm.miss_start) n_miss++;
    if (dut.u_bridge.u_rm.miss_start && &dut.u_bridge.u_l2.lk_valid_q) n_random_evict++;
    if (dut.u_bridge.u_rm.coh_write) n_wr_hit++;
    if (dut.u_bridge.u_rd.blocked && (dut.u_bridge.u_rd.rd_start || dut.u_bridge.u_rd.state_q == 2'd1)) n_mutex++;
    if (dut.u_bridge.u_rm.state_q == 2'd0 && dut.u_bridge.u_rm.rd_req && dut.u_bridge.u_rm.same_fill_line &&
        !dut.u_bridge.u_rm.got_q[dut.u_bridge.u_rm.rd_word]) n_fill_wait++;
    if (dut.u_bridge.u_rm.c_lk_pend) n_fill_byp++;
    if (dut.u_bridge.u_rm.c_flush) n_flush++;
    if (dut.u_sync.state_q == 2'd2) n_sc_reject_hw++;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned retries [NM];

  task automatic worker(input int i);
    logic [31:0] d, base;
    int n;
    bit ok;
    base = 32'h0002_0000 + 32'(i) * 32'h400;
    for (int k = 0; k < ITER; k++) begin
      ok = 0;
      while (!ok) begin
        ll(i, COUNTER, d, n);
        sc(i, COUNTER, d + 1, ok, n);
        if (!ok) retries[i]++;
      end
      bus_write(i, base + 32'(k) * 4, {16'(i), 16'(k)}, 4'hF, n);
      if (k % 4 == 3) begin
        for (int j = k - 3; j <= k; j++) begin
          bus_read(i, base + 32'(j) * 4, d, n);
          check(d == {16'(i), 16'(j)}, $sformatf("private data m%0d w%0d = %h", i, j, d));
        end
      end
    end
  endtask

  initial begin
    logic [31:0] d, d2;
    int n, nw;
    bit ok;
    for (int i = 0; i < NM; i++) begin
      m_req[i] = '0;
      retries[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // control registers
    reg_write(5'h08, 32'h1357_9BDF);
    reg_write(5'h0C, 32'h2468_ACE0);
    reg_write(5'h04, 32'h2);            // reseed
    @(negedge clk); reg_re = 1; reg_addr = 5'h08; @(negedge clk); reg_re = 0;
    check(reg_rdata == 32'h1357_9BDF, "seed register read back");
    check(dut.base_addr == 32'h0, "base address after reset");

    // latency of each access type through the whole chain
    bus_read(0, 32'h300, d, n);
    check(d == init_word(32'h300), "miss data");
    check(n == 3 + RD_DELAY, $sformatf("missing read %0d cycles", n));
    idle(10);
    bus_read(1, 32'h304, d, n);
    check(d == init_word(32'h304) && n == 3, $sformatf("hitting read %0d cycles", n));
    bus_write(2, 32'h308, 32'hABCD_0001, 4'hF, n);
    check(n == 4, $sformatf("write to cached word %0d cycles", n));
    idle(10);
    bus_write(2, 32'h4_0000, 32'hABCD_0002, 4'hF, nw);
    check(nw == 3, $sformatf("write to uncached word %0d cycles", nw));
    idle(10);
    ll(0, 32'h4_0040, d, n);
    idle(20);
    sc(0, 32'h4_0040, 32'h77, ok, n);
    check(ok, "store-conditional after load-linked succeeds");
    // the load-linked brought the line into the L2, so the store hits: 4 + 1
    check(n == 4 + 1, $sformatf("store-conditional %0d cycles", n));
    n_sc_ok++;
    idle(10);
    bus_read(3, 32'h4_0040, d, n);
    check(d == 32'h77, "store-conditional wrote memory");

    // second store-conditional without a new link fails and writes nothing
    sc(0, 32'h4_0040, 32'h88, ok, n);
    check(!ok, "store-conditional without link fails"); n_sc_fail++;
    check(n == 2, $sformatf("rejected store-conditional %0d cycles", n));
    bus_read(3, 32'h4_0040, d, n);
    check(d == 32'h77, "failed store-conditional wrote nothing");

    // another context's successful store-conditional breaks the link
    ll(0, 32'h4_0040, d, n);
    ll(1, 32'h4_0042, d, n);           // same word under the 4-byte granularity
    sc(1, 32'h4_0040, 32'h99, ok, n);
    check(ok, "second context's store-conditional succeeds"); n_sc_ok++;
    sc(0, 32'h4_0040, 32'hAA, ok, n);
    check(!ok, "first context's store-conditional fails"); n_sc_fail++;

    // an ordinary store does not break the link
    ll(2, 32'h4_0080, d, n);
    bus_write(3, 32'h4_0080, 32'h5, 4'hF, n);
    sc(2, 32'h4_0080, d + 1, ok, n);
    check(ok, "ordinary store leaves the link"); n_sc_ok++;

    // link flush
    ll(3, 32'h4_00C0, d, n);
    @(negedge clk); link_flush[3] = 1'b1; @(negedge clk); link_flush[3] = 1'b0;
    sc(3, 32'h4_00C0, 32'h1, ok, n);
    check(!ok, "store-conditional after link flush fails"); n_sc_fail++;

    // a read missing on a line whose write is still in flight waits for it
    bus_write(2, 32'h6_0000, 32'h600D_0001, 4'hF, n);
    bus_read(2, 32'h6_0000, d, n);
    check(d == 32'h600D_0001, "read after write to the same uncached line");
    check(n > 3 + RD_DELAY, $sformatf("read behind writer mutex %0d cycles", n));

    // reads of a line that is still being filled: the last word waits for
    // its beat, a word already in is answered like a hit
    repeat (20) @(negedge clk);
    bus_read(1, 32'h7_0000, d, n);
    bus_read(1, 32'h7_001C, d, n);
    check(d == init_word(32'h7_001C), "read of the last word during its fill");
    check(n > 3, $sformatf("word not yet arrived waits %0d", n));
    repeat (20) @(negedge clk);
    bus_read(1, 32'h7_0020, d, n);
    bus_read(1, 32'h7_0028, d, n);
    check(d == init_word(32'h7_0028), "read of an arrived word during its fill");
    check(n == 3, $sformatf("arrived word during fill %0d", n));

    // peripheral window
    bus_read(1, 32'h8000_0010, d, n);
    check(d == (32'h8000_0010 ^ 32'hFEED_0000), "peripheral read");
    bus_write(1, 32'h8000_0014, 32'h1, 4'hF, n);
    check(periph_count == 2, "peripheral accesses routed");

    // five lines in one set: the fifth replaces a random block
    for (int k = 0; k < 5; k++) begin
      bus_read(0, 32'h0001_0000 * k + 32'h5_0020, d, n);
      check(d == init_word((32'h0001_0000 * k + 32'h5_0020) % (1 << 20)), "set conflict data");
      idle(6);
    end
    // all five still read back correctly
    for (int k = 0; k < 5; k++) begin
      bus_read(0, 32'h0001_0000 * k + 32'h5_0020, d, n);
      check(d == init_word((32'h0001_0000 * k + 32'h5_0020) % (1 << 20)), "set conflict reread");
      idle(6);
    end

    // flush through the control register: a hit becomes a miss
    bus_read(0, 32'h300, d, n);
    check(n == 3, "hit before flush");
    reg_write(5'h04, 32'h1);
    idle(3);
    bus_read(0, 32'h300, d2, n);
    check(d2 == d && n == 3 + RD_DELAY, $sformatf("miss after flush %0d", n));

    // phase 2: four contexts share a counter
    fork
      worker(0);
      worker(1);
      worker(2);
      worker(3);
    join
    bus_read(0, COUNTER, d, n);
    check(d == init_word(COUNTER) + NM * ITER,
          $sformatf("shared counter %0d, expected %0d", d - init_word(COUNTER), NM * ITER));
    for (int i = 0; i < NM; i++) n_sc_fail += retries[i];
    n_sc_ok += NM * ITER;

    $display("mechanisms: hit=%0d miss=%0d write_hit=%0d mutex_wait=%0d fill_wait=%0d fill_bypass=%0d contention=%0d random_evict=%0d flush=%0d sc_ok=%0d sc_fail=%0d sc_reject_hw=%0d periph=%0d",
             n_hit, n_miss, n_wr_hit, n_mutex, n_fill_wait, n_fill_byp, n_contend, n_random_evict,
             n_flush, n_sc_ok, n_sc_fail, n_sc_reject_hw, periph_count);
    check(n_hit > 0, "L2 hit happened");
    check(n_miss > 0, "L2 miss happened");
    check(n_wr_hit > 0, "write hit happened");
    check(n_mutex > 0, "read waited on writer mutex");
    check(n_fill_wait > 0, "read waited on line fill");
    check(n_fill_byp > 0, "arrived word read from a line being filled");
    check(n_contend > 0, "arbiter contention happened");
    check(n_random_evict > 0, "random replacement happened");
    check(n_flush > 0, "flush happened");
    check(n_sc_fail > NM * 0 && n_sc_reject_hw > 0, "store-conditional rejected");
    check(n_sc_ok > 0, "store-conditional succeeded");
    check(periph_count > 0, "peripheral access happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
