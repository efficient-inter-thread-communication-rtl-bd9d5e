// tb_axi4_reader: the AXI4 line reader on the behavioural memory model
// (32-byte lines = 4 beats of 64 bits, first beat 6 cycles after AR).
// Checks: a request becomes one WRAP burst of 4 beats at the requested word;
// beats come requested word first and wrap around the line with correct
// data and first/last flags; the request is held back while the write-back
// mutex reports a pending write to the same line and goes out at once for
// another line.
`timescale 1ns/1ps
module tb_axi4_reader;
  import axi4_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t req;
  axi_rsp_t rsp;
  logic rd_start = 0, busy, mutex_busy = 0;
  logic [31:0] rd_addr = '0, mutex_addr = '0;
  logic beat_valid, beat_first, beat_last;
  logic [1:0] beat_word;
  logic [63:0] beat_data;

  axi4_reader #(.LINE_BYTES(32)) dut (
    .clk, .rst_n, .rd_start, .rd_addr, .busy, .mutex_busy, .mutex_addr,
    .beat_valid, .beat_word, .beat_data, .beat_first, .beat_last,
    .ar_addr(req.ar_addr), .ar_len(req.ar_len), .ar_size(req.ar_size), .ar_burst(req.ar_burst),
    .ar_valid(req.ar_valid), .ar_ready(rsp.ar_ready), .r_data(rsp.r_data), .r_last(rsp.r_last),
    .r_valid(rsp.r_valid), .r_ready(req.r_ready));
  assign req.aw_addr = '0; assign req.aw_len = '0; assign req.aw_size = '0;
  assign req.aw_burst = BURST_INCR; assign req.aw_valid = 1'b0;
  assign req.w_data = '0; assign req.w_strb = '0; assign req.w_last = 1'b0;
  assign req.w_valid = 1'b0; assign req.b_ready = 1'b1;

  axi4_mem_model #(.MEM_BYTES(4096), .RD_DELAY(6)) u_mem (.clk, .rst_n, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ar handshake monitor
  int ar_seen = 0;
  logic [31:0] ar_a;
  always @(posedge clk) if (req.ar_valid && rsp.ar_ready) begin
    ar_seen++; ar_a = req.ar_addr;
    check(req.ar_len == 8'd3 && req.ar_size == 3'd3 && req.ar_burst == BURST_WRAP, "AR burst fields");
  end

  task automatic line_read(input logic [31:0] a);
    int w0 = a[4:3];
    int k = 0;
    int bef = ar_seen;
    @(negedge clk); rd_start = 1; rd_addr = a;
    @(negedge clk); rd_start = 0;
    while (k < 4) begin
      @(posedge clk); #1;
      if (beat_valid) begin
        check(beat_word == 2'((w0 + k) % 4), $sformatf("beat %0d word %0d", k, beat_word));
        check(beat_data == u_mem.mem[{a[31:5], beat_word}], "beat data");
        check(beat_first == (k == 0) && beat_last == (k == 3), "first/last flags");
        k++;
      end
    end
    check(ar_seen == bef + 1 && ar_a == {a[31:3], 3'b0}, "one AR at the requested word");
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    line_read(32'h100);
    line_read(32'h148);
    line_read(32'h37C);
    // mutex: same line blocks
    @(negedge clk); mutex_busy = 1; mutex_addr = 32'h208;
    rd_start = 1; rd_addr = 32'h210;
    @(negedge clk); rd_start = 0;
    repeat (5) begin
      @(posedge clk); #1; check(!req.ar_valid && ar_seen == 3, "held by mutex");
    end
    @(negedge clk); mutex_busy = 0;
    repeat (3) @(posedge clk); #1;
    check(ar_seen == 4 && ar_a == 32'h210, "released after the write");
    repeat (20) @(negedge clk);
    mutex_busy = 1; mutex_addr = 32'h400;
    line_read(32'h218);
    mutex_busy = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
