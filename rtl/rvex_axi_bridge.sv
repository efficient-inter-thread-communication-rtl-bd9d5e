// rvex_axi_bridge: rVEX bus slave to AXI4 master bridge with an L2 cache.
//
// The bridge gives the rVEX access to a buffer in the host's DDR memory. Every
// rVEX address is offset by base_addr (the physical address of the reserved
// buffer, written by the host) before it is used, so the rVEX sees its memory
// starting at address 0. Reads go to the read manager, which serves them from
// the L2 cache or fetches the line over AXI4 with a wrapping burst that
// returns the requested word first. Writes go to the write manager, which
// writes each word through to AXI4 via a one-word buffer and updates the
// cache when the word is cached. AXI4 reads and writes run independently;
// the writer's mutex keeps a read from overtaking a write to the same line.
// The bridge never reports a fault: AXI4 accesses are assumed not to fail.
//
// Latency at this port (add one cycle for a delay unit in front):
//   hitting read 2, missing read 2 + AXI4 delay from read address to first
//   beat, write 2, write to a cached word 3, plus waits for a busy writer or
//   a related line fill.
//
// L2 size = NUM_BLOCKS * LINE_COUNT * LINE_BYTES bytes; the defaults give the
// 256 KiB cache of the evaluated system with 4 blocks and 32-byte lines.
// l2_flush invalidates the cache and prng_reseed restarts the replacement
// generator with prng_seed. The structure (top level with address
// translation, read and write managers, AXI4 reader and writer, cache)
// follows the document; timing details are this design's.
module rvex_axi_bridge
  import rvex_bus_pkg::*;
  import axi4_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = 4,
  parameter int unsigned LINE_COUNT = 2048,
  parameter int unsigned LINE_BYTES = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  bus_mst_t     bus_req_i,
  output bus_slv_t     bus_rsp_o,
  input  logic [31:0]  base_addr,
  input  logic         l2_flush,
  input  logic         prng_reseed,
  input  logic [127:0] prng_seed,
  output axi_req_t     axi_req_o,
  input  axi_rsp_t     axi_rsp_i
);
  localparam int unsigned WPL    = LINE_BYTES / AXI_STRB_W;
  localparam int unsigned BW     = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1;
  localparam int unsigned WOFF_W = (WPL > 1) ? $clog2(WPL) : 1;

  logic [AXI_ADDR_W-1:0] addr;
  assign addr = AXI_ADDR_W'(bus_req_i.address) + AXI_ADDR_W'(base_addr);

  // read manager <-> others
  logic                  rd_ack;
  logic [BUS_DATA_W-1:0] rd_data;
  logic                  wr_ack;
  logic                  coh_lookup, coh_hit, coh_write;
  logic [AXI_ADDR_W-1:0] coh_addr, coh_wr_addr;
  logic [BW-1:0]         coh_way, coh_wr_way;
  logic [AXI_DATA_W-1:0] coh_wr_data;
  logic [AXI_STRB_W-1:0] coh_wr_strb;
  logic                  fill_active;
  logic [AXI_ADDR_W-1:0] fill_addr;
  // cache
  logic                  c_lk_en, c_lk_hit, c_lk_pend, c_fill_start, c_fill_we, c_fill_done;
  logic                  c_wr_en, c_flush;
  logic [AXI_ADDR_W-1:0] c_lk_addr, c_fill_addr, c_wr_addr;
  logic [BW-1:0]         c_lk_way, c_lk_victim, c_fill_way, c_wr_way, c_lk_pend_way;
  logic [AXI_DATA_W-1:0] c_lk_rdata, c_fill_data, c_wr_data;
  logic [WOFF_W-1:0]     c_fill_word;
  logic [AXI_STRB_W-1:0] c_wr_strb;
  logic                  prng_next;
  logic [63:0]           rnd;
  // reader / writer
  logic                  rd_start, beat_valid, beat_first, beat_last;
  logic [AXI_ADDR_W-1:0] rd_start_addr;
  logic [WOFF_W-1:0]     beat_word;
  logic [AXI_DATA_W-1:0] beat_data;
  logic                  aw_start, writer_busy, mutex_busy;
  logic [AXI_ADDR_W-1:0] aw_start_addr, mutex_addr;
  logic [AXI_DATA_W-1:0] aw_start_data;
  logic [AXI_STRB_W-1:0] aw_start_strb;

  always_comb begin
    bus_rsp_o           = BUS_SLV_IDLE;
    bus_rsp_o.ack       = rd_ack | wr_ack;
    bus_rsp_o.read_data = rd_ack ? rd_data : '0;
    bus_rsp_o.busy      = bus_req(bus_req_i) && !(rd_ack | wr_ack);
  end

  read_manager #(.NUM_BLOCKS(NUM_BLOCKS), .LINE_BYTES(LINE_BYTES)) u_rm (
    .clk, .rst_n,
    .rd_req(bus_req_i.read_enable), .rd_addr(addr), .rd_ack, .rd_data,
    .coh_lookup, .coh_addr, .coh_hit, .coh_way,
    .coh_write, .coh_wr_addr, .coh_wr_way, .coh_wr_data, .coh_wr_strb,
    .fill_active, .fill_addr,
    .flush_req(l2_flush),
    .c_lk_en, .c_lk_addr, .c_lk_hit, .c_lk_way, .c_lk_rdata, .c_lk_victim, .c_lk_pend, .c_lk_pend_way,
    .c_fill_start, .c_fill_addr, .c_fill_way, .c_fill_we, .c_fill_word, .c_fill_data,
    .c_fill_done, .c_wr_en, .c_wr_addr, .c_wr_way, .c_wr_data, .c_wr_strb, .c_flush,
    .prng_next,
    .rd_start, .rd_start_addr, .beat_valid, .beat_word, .beat_data, .beat_first, .beat_last
  );

  write_manager #(.NUM_BLOCKS(NUM_BLOCKS), .LINE_BYTES(LINE_BYTES)) u_wm (
    .clk, .rst_n,
    .wr_req(bus_req_i.write_enable), .wr_addr(addr),
    .wr_data(bus_req_i.write_data), .wr_mask(bus_req_i.write_mask), .wr_ack,
    .coh_lookup, .coh_addr, .coh_hit, .coh_way,
    .coh_write, .coh_wr_addr, .coh_wr_way, .coh_wr_data, .coh_wr_strb,
    .fill_active, .fill_addr,
    .aw_start, .aw_start_addr, .aw_start_data, .aw_start_strb, .writer_busy
  );

  l2_cache #(.NUM_BLOCKS(NUM_BLOCKS), .LINE_COUNT(LINE_COUNT), .LINE_BYTES(LINE_BYTES),
             .WORD_BYTES(AXI_STRB_W), .ADDR_W(AXI_ADDR_W)) u_l2 (
    .clk, .rst_n,
    .lk_en(c_lk_en), .lk_addr(c_lk_addr), .lk_hit(c_lk_hit), .lk_way(c_lk_way),
    .lk_rdata(c_lk_rdata), .lk_victim(c_lk_victim), .rnd,
    .lk_pend(c_lk_pend), .lk_pend_way(c_lk_pend_way),
    .fill_start(c_fill_start), .fill_addr(c_fill_addr), .fill_way(c_fill_way),
    .fill_we(c_fill_we), .fill_word(c_fill_word), .fill_data(c_fill_data),
    .fill_done(c_fill_done),
    .wr_en(c_wr_en), .wr_addr(c_wr_addr), .wr_way(c_wr_way), .wr_data(c_wr_data),
    .wr_strb(c_wr_strb), .flush(c_flush)
  );

  xoroshiro128p u_prng (
    .clk, .rst_n, .reseed(prng_reseed), .seed(prng_seed), .next(prng_next), .rnd
  );

  axi4_reader #(.LINE_BYTES(LINE_BYTES)) u_rd (
    .clk, .rst_n, .rd_start, .rd_addr(rd_start_addr), .busy(),
    .mutex_busy, .mutex_addr,
    .beat_valid, .beat_word, .beat_data, .beat_first, .beat_last,
    .ar_addr(axi_req_o.ar_addr), .ar_len(axi_req_o.ar_len), .ar_size(axi_req_o.ar_size),
    .ar_burst(axi_req_o.ar_burst), .ar_valid(axi_req_o.ar_valid), .ar_ready(axi_rsp_i.ar_ready),
    .r_data(axi_rsp_i.r_data), .r_last(axi_rsp_i.r_last), .r_valid(axi_rsp_i.r_valid),
    .r_ready(axi_req_o.r_ready)
  );

  axi4_writer u_wr (
    .clk, .rst_n, .wr_start(aw_start), .wr_addr(aw_start_addr), .wr_data(aw_start_data),
    .wr_strb(aw_start_strb), .busy(writer_busy), .mutex_busy, .mutex_addr,
    .aw_addr(axi_req_o.aw_addr), .aw_len(axi_req_o.aw_len), .aw_size(axi_req_o.aw_size),
    .aw_burst(axi_req_o.aw_burst), .aw_valid(axi_req_o.aw_valid), .aw_ready(axi_rsp_i.aw_ready),
    .w_data(axi_req_o.w_data), .w_strb(axi_req_o.w_strb), .w_last(axi_req_o.w_last),
    .w_valid(axi_req_o.w_valid), .w_ready(axi_rsp_i.w_ready),
    .b_valid(axi_rsp_i.b_valid), .b_ready(axi_req_o.b_ready)
  );

  a_rw_excl: assert property (@(posedge clk) disable iff (!rst_n)
               !(bus_req_i.read_enable && bus_req_i.write_enable));
endmodule
