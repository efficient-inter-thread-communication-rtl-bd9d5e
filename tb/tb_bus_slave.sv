// tb_bus_slave: behavioural rVEX bus slave for testbenches.
//
// Answers each request LAT cycles after it first appears (LAT = 0: in the
// same cycle) with ack; busy is high in the cycles before. Reads return the
// stored word, or (address ^ 32'hB0B0_0000) for a word never written; writes
// store under the byte mask. Addresses in [FAULT_LO, FAULT_HI) answer with
// fault. done counts completed requests and last_source holds the source
// field of the last one.
module tb_bus_slave
  import rvex_bus_pkg::*;
#(
  parameter int unsigned LAT      = 1,
  parameter logic [31:0] FAULT_LO = 32'hFFFF_FFFF,
  parameter logic [31:0] FAULT_HI = 32'hFFFF_FFFF
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_mst_t req,
  output bus_slv_t rsp
);
  logic [31:0] mem [int unsigned];
  int unsigned cnt, done;
  logic [31:0] last_source;

  function automatic logic [31:0] peek(input logic [31:0] a);
    if (mem.exists({a[31:2], 2'b00})) return mem[{a[31:2], 2'b00}];
    return {a[31:2], 2'b00} ^ 32'hB0B0_0000;
  endfunction

  always_comb begin
    rsp = '0;
    if (bus_req(req)) begin
      rsp.ack  = (cnt >= LAT);
      rsp.busy = !rsp.ack;
      rsp.fault = rsp.ack && req.address >= FAULT_LO && req.address < FAULT_HI;
      if (rsp.ack && req.read_enable) rsp.read_data = peek(req.address);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 0; done <= 0; last_source <= '0;
    end else if (bus_req(req)) begin
      if (rsp.ack) begin
        cnt  <= 0;
        done <= done + 1;
        last_source <= req.source;
        if (req.write_enable && !rsp.fault) begin
          logic [31:0] w;
          w = peek(req.address);
          for (int k = 0; k < 4; k++) if (req.write_mask[k]) w[k*8 +: 8] = req.write_data[k*8 +: 8];
          mem[{req.address[31:2], 2'b00}] = w;
        end
      end else cnt <= cnt + 1;
    end
  end
endmodule
