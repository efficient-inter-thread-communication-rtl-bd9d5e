// tb_ctrl_regs: writes and reads back the base address and seed registers
// and checks that the flush and reseed bits give one-cycle pulses.
`timescale 1ns/1ps
module tb_ctrl_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic reg_we = 0, reg_re = 0;
  logic [4:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata, base_addr;
  logic l2_flush, prng_reseed;
  logic [127:0] prng_seed;

  ctrl_regs dut (.clk, .rst_n, .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata,
                 .base_addr, .l2_flush, .prng_reseed, .prng_seed);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk); reg_re = 1; reg_addr = a;
    @(negedge clk); reg_re = 0; d = reg_rdata;
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk); rst_n = 1;
    check(base_addr == 0 && !l2_flush && !prng_reseed, "reset values");
    wr(5'h00, 32'h1F00_0000);
    check(base_addr == 32'h1F00_0000, "base address");
    rd(5'h00, d); check(d == 32'h1F00_0000, "base read back");
    for (int i = 0; i < 4; i++) wr(5'(8 + 4 * i), 32'hA000_0000 + 32'(i));
    check(prng_seed == {32'hA000_0003, 32'hA000_0002, 32'hA000_0001, 32'hA000_0000}, "seed");
    rd(5'h10, d); check(d == 32'hA000_0002, "seed word read back");
    @(negedge clk); reg_we = 1; reg_addr = 5'h04; reg_wdata = 32'h1;
    @(negedge clk); reg_we = 0;
    check(l2_flush && !prng_reseed, "flush pulse");
    @(negedge clk);
    check(!l2_flush, "flush pulse lasts one cycle");
    @(negedge clk); reg_we = 1; reg_addr = 5'h04; reg_wdata = 32'h2;
    @(negedge clk); reg_we = 0;
    check(prng_reseed && !l2_flush, "reseed pulse");
    @(negedge clk);
    check(!prng_reseed, "reseed pulse lasts one cycle");
    check(base_addr == 32'h1F00_0000, "base unchanged by control writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
