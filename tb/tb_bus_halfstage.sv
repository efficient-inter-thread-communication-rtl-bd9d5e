// tb_bus_halfstage: the delay unit must show each request to the slave
// exactly once and one cycle late. With a slave that answers in the same
// cycle a read takes 2 cycles instead of 1; with a 3-cycle slave, 5. Data
// and write effects are checked across back-to-back requests.
`timescale 1ns/1ps
module tb_bus_halfstage;
  import rvex_bus_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_mst_t m_req [2];
  bus_slv_t m_rsp [2];
  bus_mst_t s_req [2];
  bus_slv_t s_rsp [2];

  bus_halfstage dut0 (.clk, .rst_n, .mst_req(m_req[0]), .mst_rsp(m_rsp[0]), .slv_req(s_req[0]), .slv_rsp(s_rsp[0]));
  bus_halfstage dut1 (.clk, .rst_n, .mst_req(m_req[1]), .mst_rsp(m_rsp[1]), .slv_req(s_req[1]), .slv_rsp(s_rsp[1]));
  tb_bus_slave #(.LAT(0)) u_s0 (.clk, .rst_n, .req(s_req[0]), .rsp(s_rsp[0]));
  tb_bus_slave #(.LAT(3)) u_s1 (.clk, .rst_n, .req(s_req[1]), .rsp(s_rsp[1]));

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
    logic [31:0] d;
    int n;
    m_req[0] = '0; m_req[1] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      for (int k = 0; k < 10; k++) begin
        bus_write(s, 32'h40 + 4 * k, 32'h1000 + k, 4'hF, n);
        check(n == (s == 0 ? 2 : 5), $sformatf("slave %0d write cycles %0d", s, n));
      end
      for (int k = 0; k < 10; k++) begin
        bus_read(s, 32'h40 + 4 * k, d, n);
        check(d == 32'h1000 + k, "read data");
        check(n == (s == 0 ? 2 : 5), $sformatf("slave %0d read cycles %0d", s, n));
      end
    end
    check(u_s0.done == 20 && u_s1.done == 20, $sformatf("each request seen once (%0d, %0d)", u_s0.done, u_s1.done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
