// axi4_mem_model: behavioural AXI4 slave memory for testbenches (not
// synthesizable intent; it stands in for the processing system's DDR port).
//
// MEM_BYTES of 64-bit words, addressed modulo MEM_BYTES. Every 32-bit word
// starts out as (byte address) ^ 32'h5A5A_0000, so testbenches can predict
// unwritten data. One read burst and one write at a time:
//  * read: ar_ready is high while no burst is active; the first beat comes
//    RD_DELAY cycles after the address handshake, then one beat per cycle
//    (r_valid held until r_ready). INCR and WRAP bursts are supported.
//  * write: aw_ready and w_ready are high while no write is active; the data
//    is stored when both have been accepted and b_valid follows WR_DELAY
//    cycles later.
// Counters ar_count, aw_count count address handshakes.
module axi4_mem_model
  import axi4_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 65536,
  parameter int unsigned RD_DELAY  = 8,
  parameter int unsigned WR_DELAY  = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t req,
  output axi_rsp_t rsp
);
  localparam int unsigned WORDS = MEM_BYTES / 8;
  logic [63:0] mem [WORDS];

  initial begin
    for (int unsigned i = 0; i < WORDS; i++)
      mem[i] = {(i * 8 + 4) ^ 32'h5A5A_0000, (i * 8) ^ 32'h5A5A_0000};
  end

  int unsigned ar_count, aw_count;

  // read side
  logic        rd_act;
  logic [31:0] rd_addr;
  logic [7:0]  rd_left;
  logic [7:0]  rd_len;
  axi_burst_e  rd_burst;
  int unsigned rd_wait;

  function automatic logic [31:0] next_addr(input logic [31:0] a, input logic [7:0] len,
                                            input axi_burst_e b);
    logic [31:0] span;
    span = (32'(len) + 1) * 8;
    if (b == BURST_WRAP) return (a & ~(span - 1)) | ((a + 8) & (span - 1));
    return a + 8;
  endfunction

  // write side
  logic        aw_got, w_got, wr_resp;
  logic [31:0] wr_addr;
  logic [63:0] wr_data;
  logic [7:0]  wr_strb;
  int unsigned wr_wait;

  always_comb begin
    rsp = '0;
    rsp.ar_ready = !rd_act;
    rsp.r_valid  = rd_act && (rd_wait == 0);
    rsp.r_data   = mem[(rd_addr % MEM_BYTES) / 8];
    rsp.r_last   = (rd_left == 0);
    rsp.aw_ready = !aw_got && !wr_resp;
    rsp.w_ready  = !w_got && !wr_resp;
    rsp.b_valid  = wr_resp && (wr_wait == 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act <= 1'b0; rd_addr <= '0; rd_left <= '0; rd_len <= '0; rd_burst <= BURST_INCR;
      rd_wait <= 0; aw_got <= 1'b0; w_got <= 1'b0; wr_resp <= 1'b0; wr_addr <= '0;
      wr_data <= '0; wr_strb <= '0; wr_wait <= 0; ar_count <= 0; aw_count <= 0;
    end else begin
      if (!rd_act && req.ar_valid) begin
        rd_act   <= 1'b1;
        rd_addr  <= req.ar_addr;
        rd_left  <= req.ar_len;
        rd_len   <= req.ar_len;
        rd_burst <= req.ar_burst;
        rd_wait  <= (RD_DELAY > 0) ? RD_DELAY - 1 : 0;
        ar_count <= ar_count + 1;
      end else if (rd_act) begin
        if (rd_wait != 0) rd_wait <= rd_wait - 1;
        else if (req.r_ready) begin
          if (rd_left == 0) rd_act <= 1'b0;
          rd_left <= rd_left - 1;
          rd_addr <= next_addr(rd_addr, rd_len, rd_burst);
        end
      end
      if (rsp.aw_ready && req.aw_valid) begin
        aw_got <= 1'b1; wr_addr <= req.aw_addr; aw_count <= aw_count + 1;
      end
      if (rsp.w_ready && req.w_valid) begin
        w_got <= 1'b1; wr_data <= req.w_data; wr_strb <= req.w_strb;
      end
      if (aw_got && w_got) begin
        for (int k = 0; k < 8; k++)
          if (wr_strb[k]) mem[(wr_addr % MEM_BYTES) / 8][k*8 +: 8] <= wr_data[k*8 +: 8];
        aw_got <= 1'b0; w_got <= 1'b0; wr_resp <= 1'b1;
        wr_wait <= (WR_DELAY > 0) ? WR_DELAY - 1 : 0;
      end
      if (wr_resp) begin
        if (wr_wait != 0) wr_wait <= wr_wait - 1;
        else if (req.b_ready) wr_resp <= 1'b0;
      end
    end
  end
endmodule
