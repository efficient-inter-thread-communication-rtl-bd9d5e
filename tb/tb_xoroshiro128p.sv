// tb_xoroshiro128p: compares the generator with a reference model of
// xoroshiro128+ written with plain 64-bit arithmetic, after reset, after a
// reseed, with next held low (state must not move) and with an all-zero seed.
`timescale 1ns/1ps
module tb_xoroshiro128p;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic reseed = 0, next = 0;
  logic [127:0] seed = '0;
  logic [63:0] rnd;

  xoroshiro128p #(.DEFAULT_SEED(128'h1)) dut (.clk, .rst_n, .reseed, .seed, .next, .rnd);

  int checks = 0, failures = 0;
  longint unsigned r0, r1;

  function automatic longint unsigned rotl(input longint unsigned x, input int k);
    return (x << k) | (x >> (64 - k));
  endfunction
  task automatic ref_step();
    longint unsigned t;
    t  = r0 ^ r1;
    r0 = rotl(r0, 24) ^ t ^ (t << 16);
    r1 = rotl(t, 37);
  endtask
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    r0 = 64'h1; r1 = 64'h0;
    @(negedge clk);
    check(rnd == r0 + r1, "output after reset");
    next = 1;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk); ref_step();
      check(rnd == r0 + r1, $sformatf("step %0d after reset", i));
    end
    next = 0;
    repeat (3) @(negedge clk);
    check(rnd == r0 + r1, "state holds without next");
    seed = 128'hDEAD_BEEF_0000_1111_2222_3333_4444_5555; reseed = 1;
    @(negedge clk); reseed = 0;
    r0 = 64'h2222_3333_4444_5555; r1 = 64'hDEAD_BEEF_0000_1111;
    check(rnd == r0 + r1, "output after reseed");
    next = 1;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk); ref_step();
      check(rnd == r0 + r1, $sformatf("step %0d after reseed", i));
    end
    next = 0; seed = '0; reseed = 1;
    @(negedge clk); reseed = 0;
    check(rnd == 64'h1, "zero seed replaced by default");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
