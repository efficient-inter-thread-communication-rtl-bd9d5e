// write_manager: serves rVEX writes in the bridge.
//
// A write request (wr_req held until wr_ack, address already translated)
// is widened to the AXI4 word: the 32-bit data is repeated across the word
// and the byte mask is moved to the addressed half. The write is started as
// soon as the AXI4 writer is free and no line fill of the same line is in
// flight; in that same cycle the read manager is asked to look the address
// up in the L2 cache. One cycle later:
//  * miss: the request is acknowledged (the writer now holds the word),
//  * hit: the cached word is updated through the read manager and the
//    request is acknowledged one cycle later; if a fill is running the
//    update waits until it is over.
// Bridge-port latency: 2 cycles for a missing write, 3 for a hitting write,
// plus whatever remains of a previous AXI4 write or a related line fill.
//
// Write-through with a one-word buffer, waiting for the previous write and
// for a related read, and the cache update through the read manager follow
// the document; the state machine is this design's.
module write_manager
  import axi4_pkg::*;
  import rvex_bus_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = 4,
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned BW = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_req,
  input  logic [AXI_ADDR_W-1:0] wr_addr,
  input  logic [BUS_DATA_W-1:0] wr_data,
  input  logic [BUS_MASK_W-1:0] wr_mask,
  output logic                  wr_ack,
  // coherence signals
  output logic                  coh_lookup,
  output logic [AXI_ADDR_W-1:0] coh_addr,
  input  logic                  coh_hit,
  input  logic [BW-1:0]         coh_way,
  output logic                  coh_write,
  output logic [AXI_ADDR_W-1:0] coh_wr_addr,
  output logic [BW-1:0]         coh_wr_way,
  output logic [AXI_DATA_W-1:0] coh_wr_data,
  output logic [AXI_STRB_W-1:0] coh_wr_strb,
  input  logic                  fill_active,
  input  logic [AXI_ADDR_W-1:0] fill_addr,
  // AXI4 writer
  output logic                  aw_start,
  output logic [AXI_ADDR_W-1:0] aw_start_addr,
  output logic [AXI_DATA_W-1:0] aw_start_data,
  output logic [AXI_STRB_W-1:0] aw_start_strb,
  input  logic                  writer_busy
);
  localparam int unsigned LINE_LO = $clog2(LINE_BYTES);
  localparam int unsigned SUBW    = AXI_DATA_W / BUS_DATA_W;
  localparam int unsigned SUB_W   = (SUBW > 1) ? $clog2(SUBW) : 1;

  typedef enum logic [1:0] {W_IDLE, W_CHECK, W_WAITFILL, W_ACK} wmstate_e;
  wmstate_e          state_q;
  logic [BW-1:0]     way_q;
  logic [AXI_DATA_W-1:0] wide_data;
  logic [AXI_STRB_W-1:0] wide_strb;
  logic              related;
  logic              can_start;

  always_comb begin
    logic [SUB_W-1:0] s;
    s = (SUBW > 1) ? SUB_W'(wr_addr >> $clog2(BUS_DATA_W / 8)) : '0;
    wide_data = {SUBW{wr_data}};
    wide_strb = '0;
    wide_strb[s*BUS_MASK_W +: BUS_MASK_W] = wr_mask;
  end

  assign related   = fill_active && ((wr_addr >> LINE_LO) == (fill_addr >> LINE_LO));
  assign can_start = (state_q == W_IDLE) && wr_req && !writer_busy && !related;

  assign aw_start      = can_start;
  assign aw_start_addr = wr_addr;
  assign aw_start_data = wide_data;
  assign aw_start_strb = wide_strb;
  assign coh_lookup    = can_start;
  assign coh_addr      = wr_addr;

  assign coh_wr_addr = wr_addr;
  assign coh_wr_data = wide_data;
  assign coh_wr_strb = wide_strb;

  always_comb begin
    wr_ack     = 1'b0;
    coh_write  = 1'b0;
    coh_wr_way = way_q;
    unique case (state_q)
      W_CHECK: begin
        coh_wr_way = coh_way;
        if (!coh_hit)          wr_ack    = 1'b1;
        else if (!fill_active) coh_write = 1'b1;
      end
      W_WAITFILL: coh_write = !fill_active;
      W_ACK:      wr_ack    = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= W_IDLE;
      way_q   <= '0;
    end else begin
      unique case (state_q)
        W_IDLE:  if (can_start) state_q <= W_CHECK;
        W_CHECK: begin
          way_q <= coh_way;
          if (!coh_hit)          state_q <= W_IDLE;
          else if (!fill_active) state_q <= W_ACK;
          else                   state_q <= W_WAITFILL;
        end
        W_WAITFILL: if (!fill_active) state_q <= W_ACK;
        W_ACK:   state_q <= W_IDLE;
        default: state_q <= W_IDLE;
      endcase
    end
  end
endmodule
