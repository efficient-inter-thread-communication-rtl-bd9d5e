// tb_bus_demuxer: three slaves with a hole in the address map. Requests must
// reach the slave owning the address (data differs per slave), writes must
// land only there, and an unmapped address must be answered with fault.
`timescale 1ns/1ps
module tb_bus_demuxer;
  import rvex_bus_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_mst_t m_req [1];
  bus_slv_t m_rsp [1];
  bus_mst_t s_req [3];
  bus_slv_t s_rsp [3];

  bus_demuxer #(
    .NUM_SLAVES(3),
    .SLV_BASE({32'h9000_0000, 32'h8000_0000, 32'h0000_0000}),
    .SLV_SIZE({32'h1000_0000, 32'h0000_1000, 32'h4000_0000})
  ) dut (.mst_req(m_req[0]), .mst_rsp(m_rsp[0]), .slv_req(s_req), .slv_rsp(s_rsp));

  tb_bus_slave #(.LAT(1)) u_s0 (.clk, .rst_n, .req(s_req[0]), .rsp(s_rsp[0]));
  tb_bus_slave #(.LAT(2)) u_s1 (.clk, .rst_n, .req(s_req[1]), .rsp(s_rsp[1]));
  tb_bus_slave #(.LAT(0)) u_s2 (.clk, .rst_n, .req(s_req[2]), .rsp(s_rsp[2]));

  `include "tb_bus_tasks.svh"

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d, a;
    logic f;
    int n;
    logic [31:0] addrs [6] = '{32'h0000_0010, 32'h3FFF_FFFC, 32'h8000_0000, 32'h8000_0FFC,
                                32'h9000_0004, 32'h9FFF_FFF0};
    int owner [6] = '{0, 0, 1, 1, 2, 2};
    m_req[0] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      bus_write(0, addrs[i], 32'h7700 + i, 4'hF, n);
      bus_read(0, addrs[i], d, n);
      check(d == 32'h7700 + i, $sformatf("data via slave %0d", owner[i]));
      check(n == (owner[i] == 0 ? 2 : owner[i] == 1 ? 3 : 1), $sformatf("latency of slave %0d: %0d", owner[i], n));
    end
    check(u_s0.done == 4 && u_s1.done == 4 && u_s2.done == 4, "requests split by address");
    foreach (addrs[i]) begin
      a = addrs[i];
      check(owner[i] == 0 || u_s0.peek(a) == (a ^ 32'hB0B0_0000), "no stray write in slave 0");
    end
    for (int k = 0; k < 3; k++) begin
      a = (k == 0) ? 32'h4000_0000 : (k == 1) ? 32'h8000_1000 : 32'hA000_0000;
      bus_access(0, 1'b0, 1'b0, a, '0, '0, d, f, n);
      check(f && n == 1, $sformatf("unmapped %h faults", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
