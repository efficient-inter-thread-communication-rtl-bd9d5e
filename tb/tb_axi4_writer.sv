// tb_axi4_writer: the single-entry write-back buffer on the behavioural
// memory model. Checks: each write becomes one single-beat INCR burst of
// 64 bits with the given strobe; only the strobed bytes change in memory;
// busy and the mutex (with the buffered address) are set from the start
// until the write response, then drop.
`timescale 1ns/1ps
module tb_axi4_writer;
  import axi4_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t req;
  axi_rsp_t rsp;
  logic wr_start = 0, busy, mutex_busy;
  logic [31:0] wr_addr = '0, mutex_addr;
  logic [63:0] wr_data = '0;
  logic [7:0]  wr_strb = '0;

  axi4_writer dut (
    .clk, .rst_n, .wr_start, .wr_addr, .wr_data, .wr_strb, .busy, .mutex_busy, .mutex_addr,
    .aw_addr(req.aw_addr), .aw_len(req.aw_len), .aw_size(req.aw_size), .aw_burst(req.aw_burst),
    .aw_valid(req.aw_valid), .aw_ready(rsp.aw_ready), .w_data(req.w_data), .w_strb(req.w_strb),
    .w_last(req.w_last), .w_valid(req.w_valid), .w_ready(rsp.w_ready), .b_valid(rsp.b_valid),
    .b_ready(req.b_ready));
  assign req.ar_addr = '0; assign req.ar_len = '0; assign req.ar_size = '0;
  assign req.ar_burst = BURST_INCR; assign req.ar_valid = 1'b0; assign req.r_ready = 1'b1;

  axi4_mem_model #(.MEM_BYTES(4096), .WR_DELAY(4)) u_mem (.clk, .rst_n, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (req.aw_valid && rsp.aw_ready)
      check(req.aw_len == 0 && req.aw_size == 3'd3 && req.aw_burst == BURST_INCR, "AW fields");
    if (req.w_valid && rsp.w_ready) check(req.w_last, "single beat is last");
  end

  task automatic write(input logic [31:0] a, input logic [63:0] d, input logic [7:0] s);
    logic [63:0] old = u_mem.mem[a[11:3]];
    logic [63:0] exp;
    int n = 0;
    for (int k = 0; k < 8; k++) exp[k*8 +: 8] = s[k] ? d[k*8 +: 8] : old[k*8 +: 8];
    @(negedge clk); wr_start = 1; wr_addr = a; wr_data = d; wr_strb = s;
    @(negedge clk); wr_start = 0;
    check(busy && mutex_busy && mutex_addr == a, "busy and mutex during the write");
    while (busy && n < 100) begin @(negedge clk); n++; end
    check(!mutex_busy && n < 100, "released after the response");
    check(u_mem.mem[a[11:3]] == exp, $sformatf("memory %h", u_mem.mem[a[11:3]]));
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    write(32'h100, 64'h1122_3344_5566_7788, 8'hFF);
    write(32'h108, 64'hAAAA_AAAA_BBBB_BBBB, 8'h0F);
    write(32'h10C, 64'hCCCC_CCCC_DDDD_DDDD, 8'hF0);
    write(32'h200, 64'hEEEE_EEEE_EEEE_EEEE, 8'b0100_0010);
    for (int i = 0; i < 10; i++) write(32'(i * 8 + 32'h300), {$urandom, $urandom}, 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
