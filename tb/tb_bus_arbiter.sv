// tb_bus_arbiter: four masters on one slave (1-cycle latency).
// Checks: an uncontended request costs no extra cycle and is stamped with
// its master index; simultaneous requests are served in round-robin order
// starting after the master granted last; under heavy random traffic every
// master's writes land and every read returns its own data.
`timescale 1ns/1ps
module tb_bus_arbiter;
  import rvex_bus_pkg::*;
  localparam int NM = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_mst_t m_req [NM];
  bus_slv_t m_rsp [NM];
  bus_mst_t s_req;
  bus_slv_t s_rsp;

  bus_arbiter #(.NUM_MASTERS(NM)) dut (.clk, .rst_n, .mst_req(m_req), .mst_rsp(m_rsp),
                                        .slv_req(s_req), .slv_rsp(s_rsp));
  tb_bus_slave #(.LAT(1)) u_s (.clk, .rst_n, .req(s_req), .rsp(s_rsp));

  `include "tb_bus_tasks.svh"

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int order [$];
  task automatic timed_read(input int i, input logic [31:0] a);
    logic [31:0] d;
    int n;
    bus_read(i, a, d, n);
    order.push_back(i);
    check(d == (a ^ 32'hB0B0_0000), "contended read data");
  endtask

  task automatic traffic(input int ii);
    logic [31:0] dd;
    int nn;
    for (int k = 0; k < 30; k++) begin
      bus_write(ii, 32'h1000 * (ii + 1) + 4 * k, 32'(ii * 1000 + k), 4'hF, nn);
      check(nn <= 2 * NM + 1, $sformatf("bounded wait %0d", nn));
      bus_read(ii, 32'h1000 * (ii + 1) + 4 * k, dd, nn);
      check(dd == 32'(ii * 1000 + k), "own data under contention");
    end
  endtask

  initial begin
    logic [31:0] d;
    int n;
    for (int i = 0; i < NM; i++) m_req[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < NM; i++) begin
      bus_read(i, 32'h100 + 4 * i, d, n);
      check(n == 2, $sformatf("uncontended latency %0d", n));
      check(u_s.last_source == 32'(i), $sformatf("source stamp %0d", u_s.last_source));
    end
    // last granted is 3: all four at once -> 0,1,2,3
    order.delete();
    fork timed_read(2, 32'h10); timed_read(0, 32'h14); timed_read(3, 32'h18); timed_read(1, 32'h1C); join
    check(order.size() == 4 && order[0] == 0 && order[1] == 1 && order[2] == 2 && order[3] == 3,
          "round-robin order from 0");
    // master 1 alone, then 0 and 3 together: 3 comes first
    bus_read(1, 32'h20, d, n);
    order.delete();
    fork timed_read(0, 32'h24); timed_read(3, 32'h28); join
    check(order.size() == 2 && order[0] == 3 && order[1] == 0, "round-robin continues after last grant");
    // heavy traffic
    fork traffic(0); traffic(1); traffic(2); traffic(3); join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
