// tb_write_manager: the write manager with the AXI4 writer and the memory
// model; the read manager's side of the coherence port is played by the
// testbench (hit/way answered one cycle after a lookup, fill state set by
// the test). Checks: a write that misses the L2 is acknowledged in 2 cycles
// and reaches memory with the 32-bit word and mask placed in the right half
// of the 64-bit beat; a write that hits also updates the L2 through the
// coherence port (same data, strobe and way) and costs one cycle more; a
// hit while a line fill is running waits until the fill ends; a write to
// the line being filled does not start until the fill ends; a second write
// waits for the single-entry write-back buffer.
`timescale 1ns/1ps
module tb_write_manager;
  import axi4_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_req = 0, wr_ack;
  logic [31:0] wr_addr = '0, wr_data = '0;
  logic [3:0] wr_mask = '0;
  logic coh_lookup, coh_hit = 0, coh_write, fill_active = 0;
  logic [31:0] coh_addr, coh_wr_addr, fill_addr = '0;
  logic [0:0] coh_way = '0, coh_wr_way;
  logic [63:0] coh_wr_data;
  logic [7:0] coh_wr_strb;
  logic aw_start, writer_busy;
  logic [31:0] aw_start_addr;
  logic [63:0] aw_start_data;
  logic [7:0] aw_start_strb;
  axi_req_t req;
  axi_rsp_t rsp;

  write_manager #(.NUM_BLOCKS(2), .LINE_BYTES(32)) dut (.*);
  axi4_writer u_wr (
    .clk, .rst_n, .wr_start(aw_start), .wr_addr(aw_start_addr), .wr_data(aw_start_data),
    .wr_strb(aw_start_strb), .busy(writer_busy), .mutex_busy(), .mutex_addr(),
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
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // coherence side: hit_mode decides the answer to lookups
  bit hit_mode = 0;
  int coh_writes = 0;
  logic [63:0] last_cw_data;
  logic [7:0]  last_cw_strb;
  always @(posedge clk) begin
    coh_hit <= coh_lookup && hit_mode;
    coh_way <= 1'b1;
    if (coh_write) begin
      coh_writes++; last_cw_data = coh_wr_data; last_cw_strb = coh_wr_strb;
      check(coh_wr_way == 1'b1 && coh_wr_addr == wr_addr, "coherence write way/address");
      check(!fill_active, "no cache write during a fill");
    end
  end

  task automatic write(input logic [31:0] a, input logic [31:0] d, input logic [3:0] m, output int n);
    n = 0;
    @(negedge clk); wr_req = 1; wr_addr = a; wr_data = d; wr_mask = m;
    do begin @(posedge clk); #1; n++; end while (!wr_ack && n < 200);
    check(wr_ack, "write acknowledged");
    @(negedge clk); wr_req = 0;
  endtask

  function automatic logic [63:0] merge(input logic [63:0] old, input logic [31:0] a,
                                        input logic [31:0] d, input logic [3:0] m);
    logic [7:0] s = a[2] ? {m, 4'h0} : {4'h0, m};
    for (int k = 0; k < 8; k++) if (s[k]) old[k*8 +: 8] = {d, d}[k*8 +: 8];
    return old;
  endfunction

  task automatic wait_idle();
    int k = 0;
    while (writer_busy && k < 100) begin @(negedge clk); k++; end
  endtask

  initial begin
    int n, cw;
    logic [63:0] exp;
    repeat (2) @(negedge clk); rst_n = 1;
    // misses
    for (int i = 0; i < 8; i++) begin
      logic [31:0] a;
      logic [3:0] m;
      a = 32'h100 + 4 * i; m = (i % 3 == 0) ? 4'hF : 4'(i);
      exp = merge(u_mem.mem[a[11:3]], a, 32'hA0B0C0D0 + i, m);
      wait_idle();
      write(a, 32'hA0B0C0D0 + i, m, n);
      check(n == 1, $sformatf("miss write latency %0d", n));
      wait_idle(); @(negedge clk);
      check(u_mem.mem[a[11:3]] == exp, $sformatf("memory %h exp %h", u_mem.mem[a[11:3]], exp));
    end
    check(coh_writes == 0, "no cache update on a miss");
    // hits
    hit_mode = 1;
    wait_idle();
    write(32'h204, 32'h1234_5678, 4'b0110, n);
    check(n == 2, $sformatf("hit write latency %0d", n));
    check(coh_writes == 1 && last_cw_strb == 8'b0110_0000 && last_cw_data[63:32] == 32'h1234_5678,
          "hit updates the cache word");
    // hit while another line is being filled
    wait_idle();
    fill_active = 1; fill_addr = 32'h800;
    fork
      write(32'h300, 32'h1, 4'hF, n);
      begin repeat (6) @(negedge clk); fill_active = 0; end
    join
    check(n >= 6 && coh_writes == 2, $sformatf("hit waits for the fill %0d", n));
    // write to the line being filled does not start
    wait_idle();
    fill_active = 1; fill_addr = 32'h400; hit_mode = 0;
    cw = u_mem.aw_count;
    fork
      write(32'h408, 32'h2, 4'hF, n);
      begin repeat (5) @(negedge clk); check(u_mem.aw_count == cw, "held while its line fills"); fill_active = 0; end
    join
    check(n >= 5, "write to the filling line waits");
    // back-to-back writes wait for the write-back buffer
    wait_idle();
    write(32'h500, 32'h3, 4'hF, n);
    write(32'h504, 32'h4, 4'hF, n);
    check(n > 2, $sformatf("second write waits for the buffer %0d", n));
    wait_idle(); @(negedge clk);
    check(u_mem.mem[32'h500 >> 3] == 64'h4_0000_0003, "both writes landed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
