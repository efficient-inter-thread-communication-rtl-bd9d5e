// tb_sync_unit: load-linked/store-conditional semantics behind a 4-master
// arbiter (which stamps the source) on a 1-cycle slave.
// Checks: ordinary accesses pass with unchanged latency; a store-conditional
// after a load-linked succeeds, writes memory, reports SC_SUCCESS and costs
// one cycle more than a store; without a link, after another source's
// successful store-conditional to the same word, or after a link flush it
// fails in 2 cycles, writes nothing and raises no fault; an ordinary store
// and a store-conditional to another word keep the link; the low two address
// bits are ignored; a new load-linked replaces the old link; a load-linked
// that faults sets no link. Finally four masters increment one counter
// with retry loops and the total must be exact.
`timescale 1ns/1ps
module tb_sync_unit;
  import rvex_bus_pkg::*;
  localparam int NM = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_mst_t m_req [NM];
  bus_slv_t m_rsp [NM];
  bus_mst_t a_req, s_req;
  bus_slv_t a_rsp, s_rsp;
  logic [NM-1:0] link_flush = '0;

  bus_arbiter #(.NUM_MASTERS(NM)) u_arb (.clk, .rst_n, .mst_req(m_req), .mst_rsp(m_rsp),
                                          .slv_req(a_req), .slv_rsp(a_rsp));
  sync_unit #(.NUM_SOURCES(NM)) dut (.clk, .rst_n, .link_flush, .mst_req(a_req), .mst_rsp(a_rsp),
                                     .slv_req(s_req), .slv_rsp(s_rsp));
  tb_bus_slave #(.LAT(1), .FAULT_LO(32'hF000_0000), .FAULT_HI(32'hF000_1000)) u_s (
    .clk, .rst_n, .req(s_req), .rsp(s_rsp));

  `include "tb_bus_tasks.svh"

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  task automatic ll(input int i, input logic [31:0] a, output logic [31:0] d);
    logic f; int n;
    bus_access(i, 1'b0, 1'b1, a, '0, '0, d, f, n);
  endtask
  task automatic sc(input int i, input logic [31:0] a, input logic [31:0] w, output bit ok, output int n);
    logic [31:0] d; logic f;
    bus_access(i, 1'b1, 1'b1, a, w, 4'hF, d, f, n);
    check(!f || a >= 32'hF000_0000, "no fault on store-conditional");
    ok = (d == SC_SUCCESS) && !f;
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic incr(input int i, input int times);
    logic [31:0] d; bit ok; int n;
    for (int k = 0; k < times; k++) begin
      ok = 0;
      while (!ok) begin
        ll(i, 32'h500, d);
        repeat ($urandom_range(0, 3)) @(negedge clk);
        sc(i, 32'h500, d + 1, ok, n);
      end
    end
  endtask

  initial begin
    logic [31:0] d;
    bit ok;
    int n, nst;
    for (int i = 0; i < NM; i++) m_req[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;

    bus_write(0, 32'h100, 32'h11, 4'hF, nst);
    check(nst == 2, $sformatf("plain store latency %0d", nst));
    bus_read(0, 32'h100, d, n);
    check(d == 32'h11 && n == 2, "plain load passes");

    ll(0, 32'h100, d);
    check(d == 32'h11, "load-linked data");
    sc(0, 32'h100, 32'h12, ok, n);
    check(ok, "store-conditional succeeds");
    check(n == nst + 1, $sformatf("store-conditional latency %0d", n));
    check(u_s.peek(32'h100) == 32'h12, "store-conditional wrote");

    sc(0, 32'h100, 32'h13, ok, n);
    check(!ok && n == 2, $sformatf("no link: fails in %0d", n));
    check(u_s.peek(32'h100) == 32'h12, "failed store-conditional wrote nothing");

    ll(0, 32'h200, d); ll(1, 32'h203, d);
    sc(1, 32'h200, 32'h1, ok, n); check(ok, "granularity: address bits 1:0 ignored");
    sc(0, 32'h200, 32'h2, ok, n); check(!ok, "other source's success breaks the link");

    ll(2, 32'h300, d);
    bus_write(3, 32'h300, 32'h9, 4'hF, n);
    ll(3, 32'h304, d);
    sc(3, 32'h304, 32'h1, ok, n); check(ok, "other word store-conditional");
    sc(2, 32'h300, 32'h5, ok, n); check(ok, "plain store and other word keep the link");

    ll(1, 32'h400, d);
    ll(1, 32'h404, d);
    sc(1, 32'h400, 32'h1, ok, n); check(!ok, "second load-linked replaces the link");

    ll(2, 32'h408, d);
    @(negedge clk); link_flush[2] = 1; @(negedge clk); link_flush[2] = 0;
    sc(2, 32'h408, 32'h1, ok, n); check(!ok, "link flush");

    ll(3, 32'hF000_0000, d);
    sc(3, 32'hF000_0000, 32'h1, ok, n); check(!ok, "faulting load-linked sets no link");

    fork incr(0, 25); incr(1, 25); incr(2, 25); incr(3, 25); join
    bus_read(0, 32'h500, d, n);
    check(d == (32'h500 ^ 32'hB0B0_0000) + 100, $sformatf("atomic counter %h", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
