// rvex_mem_system: the shared memory hierarchy of a multi-context rVEX system
// with load-linked/store-conditional support.
//
// NUM_MASTERS rVEX bus masters (the L1 caches of the processor's contexts;
// load-linked and store-conditional bypass them and arrive here with the
// synchronize flag) are merged by a round-robin arbiter that stamps each
// request with its master index. The merged stream passes the
// synchronization unit, which keeps one link register per master, and a
// demuxer: the low 2 GiB go through a one-cycle delay unit to the
// rVEX-to-AXI4 bridge with its L2 cache; the high 2 GiB are brought out on
// the periph port for other bus slaves. The bridge's control registers
// (base address of the DDR buffer, L2 flush, PRNG reseed) are written by the
// host through the reg_* port. link_flush[i] clears the link register of
// master i, e.g. when that context takes an interrupt.
//
// Latency seen by an uncontended master for the memory window: hitting read
// 3 cycles, write 3, write to a cached word 4, missing read 3 + AXI4 read
// delay, store-conditional one cycle more than a store.
//
// The chain arbiter - synchronization unit - L2 bridge, the delay unit and
// the 256 KiB, 4-block, 32-byte-line L2 follow the document; the address map
// of the demuxer and the register port are this design's choices.
module rvex_mem_system
  import rvex_bus_pkg::*;
  import axi4_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4,
  parameter int unsigned NUM_BLOCKS  = 4,
  parameter int unsigned LINE_COUNT  = 2048,
  parameter int unsigned LINE_BYTES  = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // rVEX bus masters
  input  bus_mst_t               mst_req [NUM_MASTERS],
  output bus_slv_t               mst_rsp [NUM_MASTERS],
  input  logic [NUM_MASTERS-1:0] link_flush,
  // other bus slaves (upper 2 GiB)
  output bus_mst_t               periph_req,
  input  bus_slv_t               periph_rsp,
  // host register port
  input  logic                   reg_we,
  input  logic                   reg_re,
  input  logic [4:0]             reg_addr,
  input  logic [31:0]            reg_wdata,
  output logic [31:0]            reg_rdata,
  // AXI4 master towards the DDR memory
  output axi_req_t               axi_req,
  input  axi_rsp_t               axi_rsp
);
  bus_mst_t arb_req, sync_req, hs_req, mem_req;
  bus_slv_t arb_rsp, sync_rsp, hs_rsp, mem_rsp;
  bus_mst_t dmx_req [2];
  bus_slv_t dmx_rsp [2];

  logic [31:0]  base_addr;
  logic         l2_flush, prng_reseed;
  logic [127:0] prng_seed;

  bus_arbiter #(.NUM_MASTERS(NUM_MASTERS)) u_arb (
    .clk, .rst_n, .mst_req, .mst_rsp, .slv_req(arb_req), .slv_rsp(arb_rsp)
  );

  sync_unit #(.NUM_SOURCES(NUM_MASTERS)) u_sync (
    .clk, .rst_n, .link_flush,
    .mst_req(arb_req), .mst_rsp(arb_rsp), .slv_req(sync_req), .slv_rsp(sync_rsp)
  );

  bus_demuxer #(
    .NUM_SLAVES(2),
    .SLV_BASE({32'h8000_0000, 32'h0000_0000}),
    .SLV_SIZE({32'h8000_0000, 32'h8000_0000})
  ) u_dmx (
    .mst_req(sync_req), .mst_rsp(sync_rsp), .slv_req(dmx_req), .slv_rsp(dmx_rsp)
  );

  assign hs_req     = dmx_req[0];
  assign dmx_rsp[0] = hs_rsp;
  assign periph_req = dmx_req[1];
  assign dmx_rsp[1] = periph_rsp;

  bus_halfstage u_hs (
    .clk, .rst_n, .mst_req(hs_req), .mst_rsp(hs_rsp), .slv_req(mem_req), .slv_rsp(mem_rsp)
  );

  ctrl_regs u_regs (
    .clk, .rst_n, .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata,
    .base_addr, .l2_flush, .prng_reseed, .prng_seed
  );

  rvex_axi_bridge #(.NUM_BLOCKS(NUM_BLOCKS), .LINE_COUNT(LINE_COUNT), .LINE_BYTES(LINE_BYTES)) u_bridge (
    .clk, .rst_n, .bus_req_i(mem_req), .bus_rsp_o(mem_rsp),
    .base_addr, .l2_flush, .prng_reseed, .prng_seed,
    .axi_req_o(axi_req), .axi_rsp_i(axi_rsp)
  );
endmodule
