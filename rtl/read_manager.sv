// read_manager: serves rVEX reads in the bridge and owns the L2 cache.
//
// A read request (rd_req held until rd_ack, rd_addr already translated to
// the AXI4 address space) is looked up in the cache in the cycle it arrives;
// the tag compare happens in the next cycle. On a hit the word is returned in
// that second cycle. On a miss a victim block is chosen (empty first, else
// random), the cache line is reserved (tag written, valid cleared) and the
// AXI4 reader is started with the requested word first. As soon as the first
// beat arrives the request is acknowledged with it; the rest of the line is
// written into the cache in the background and the line becomes valid with
// the last beat. While that fill runs:
//  * reads that hit other lines are served normally,
//  * a read of the line being filled waits until its own word has been
//    written (a per-word arrival mask, got_q) and is then looked up with
//    c_lk_pend, which makes the cache treat the fill way as valid,
//  * a read that misses waits until the fill is over and is then looked up
//    again (the reader handles one line at a time).
//
// The write manager uses the cache through this unit (the coherence
// signals): coh_lookup starts a lookup of coh_addr, coh_hit/coh_way give the
// result one cycle later, and coh_write updates a hitting word under a byte
// strobe. fill_active and fill_addr tell it which line is in flight. A flush
// request is held until no fill is running and then clears all valid flags.
//
// Read latency seen at this unit's port: 2 cycles on a hit (the cycle the
// request appears and the compare cycle); on a miss 2 cycles plus the AXI4
// delay from read address to first beat.
//
// The division of work between read manager, write manager and cache, the
// early return of the requested word and the waiting rules follow the
// document; the state machine is this design's.
module read_manager
  import axi4_pkg::*;
  import rvex_bus_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = 4,
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned WPL    = LINE_BYTES / AXI_STRB_W,
  localparam int unsigned BW     = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1,
  localparam int unsigned WOFF_W = (WPL > 1) ? $clog2(WPL) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // read requests
  input  logic                  rd_req,
  input  logic [AXI_ADDR_W-1:0] rd_addr,
  output logic                  rd_ack,
  output logic [BUS_DATA_W-1:0] rd_data,
  // coherence signals to/from the write manager
  input  logic                  coh_lookup,
  input  logic [AXI_ADDR_W-1:0] coh_addr,
  output logic                  coh_hit,
  output logic [BW-1:0]         coh_way,
  input  logic                  coh_write,
  input  logic [AXI_ADDR_W-1:0] coh_wr_addr,
  input  logic [BW-1:0]         coh_wr_way,
  input  logic [AXI_DATA_W-1:0] coh_wr_data,
  input  logic [AXI_STRB_W-1:0] coh_wr_strb,
  output logic                  fill_active,
  output logic [AXI_ADDR_W-1:0] fill_addr,
  // flush request
  input  logic                  flush_req,
  // L2 cache
  output logic                  c_lk_en,
  output logic [AXI_ADDR_W-1:0] c_lk_addr,
  input  logic                  c_lk_hit,
  input  logic [BW-1:0]         c_lk_way,
  input  logic [AXI_DATA_W-1:0] c_lk_rdata,
  input  logic [BW-1:0]         c_lk_victim,
  output logic                  c_lk_pend,
  output logic [BW-1:0]         c_lk_pend_way,
  output logic                  c_fill_start,
  output logic [AXI_ADDR_W-1:0] c_fill_addr,
  output logic [BW-1:0]         c_fill_way,
  output logic                  c_fill_we,
  output logic [WOFF_W-1:0]     c_fill_word,
  output logic [AXI_DATA_W-1:0] c_fill_data,
  output logic                  c_fill_done,
  output logic                  c_wr_en,
  output logic [AXI_ADDR_W-1:0] c_wr_addr,
  output logic [BW-1:0]         c_wr_way,
  output logic [AXI_DATA_W-1:0] c_wr_data,
  output logic [AXI_STRB_W-1:0] c_wr_strb,
  output logic                  c_flush,
  output logic                  prng_next,
  // AXI4 reader
  output logic                  rd_start,
  output logic [AXI_ADDR_W-1:0] rd_start_addr,
  input  logic                  beat_valid,
  input  logic [WOFF_W-1:0]     beat_word,
  input  logic [AXI_DATA_W-1:0] beat_data,
  input  logic                  beat_first,
  input  logic                  beat_last
);
  localparam int unsigned LINE_LO = $clog2(LINE_BYTES);
  localparam int unsigned BYTE_W  = $clog2(AXI_STRB_W);
  localparam int unsigned SUBW    = AXI_DATA_W / BUS_DATA_W;
  localparam int unsigned SUB_W   = (SUBW > 1) ? $clog2(SUBW) : 1;

  typedef enum logic [1:0] {M_IDLE, M_LOOKUP, M_FIRST, M_WAITFILL} mstate_e;
  mstate_e               state_q, state_d;
  logic                  fill_q;
  logic [AXI_ADDR_W-1:0] fill_addr_q;
  logic [BW-1:0]         fill_way_q;
  logic                  flush_pend_q;
  logic                  miss_start;
  logic                  same_fill_line;
  logic [WPL-1:0]        got_q;
  logic [WOFF_W-1:0]     rd_word;

  function automatic logic [BUS_DATA_W-1:0] pick(input logic [AXI_DATA_W-1:0] w,
                                                 input logic [AXI_ADDR_W-1:0] a);
    logic [SUB_W-1:0] s;
    s = (SUBW > 1) ? SUB_W'(a >> $clog2(BUS_DATA_W / 8)) : '0;
    return w[s*BUS_DATA_W +: BUS_DATA_W];
  endfunction

  assign fill_active    = fill_q;
  assign fill_addr      = fill_addr_q;
  assign same_fill_line = fill_q && ((rd_addr >> LINE_LO) == (fill_addr_q >> LINE_LO));
  assign rd_word        = (WPL > 1) ? WOFF_W'(rd_addr >> $clog2(AXI_STRB_W)) : '0;
  assign c_lk_pend_way  = fill_way_q;

  assign coh_hit = c_lk_hit;
  assign coh_way = c_lk_way;

  always_comb begin
    state_d    = state_q;
    rd_ack     = 1'b0;
    rd_data    = '0;
    c_lk_en    = 1'b0;
    c_lk_addr  = rd_addr;
    c_lk_pend  = 1'b0;
    miss_start = 1'b0;
    c_flush    = 1'b0;
    unique case (state_q)
      M_IDLE: begin
        if (rd_req) begin
          if (!same_fill_line) begin
            c_lk_en = 1'b1;
            state_d = M_LOOKUP;
          end else if (got_q[rd_word]) begin
            // word already in the line being filled: read it from the fill way
            c_lk_en   = 1'b1;
            c_lk_pend = 1'b1;
            state_d   = M_LOOKUP;
          end
        end else if (coh_lookup) begin
          c_lk_en   = 1'b1;
          c_lk_addr = coh_addr;
        end else if (flush_pend_q && !fill_q) begin
          c_flush = 1'b1;
        end
      end
      M_LOOKUP: begin
        if (c_lk_hit) begin
          rd_ack  = 1'b1;
          rd_data = pick(c_lk_rdata, rd_addr);
          state_d = M_IDLE;
        end else if (fill_q) begin
          state_d = M_WAITFILL;
        end else begin
          miss_start = 1'b1;
          state_d    = M_FIRST;
        end
      end
      M_FIRST: begin
        if (beat_valid && beat_first) begin
          rd_ack  = 1'b1;
          rd_data = pick(beat_data, rd_addr);
          state_d = M_IDLE;
        end
      end
      M_WAITFILL: if (!fill_q) state_d = M_IDLE;
      default: state_d = M_IDLE;
    endcase
  end

  // Line fill and cache writes.
  assign c_fill_start  = miss_start;
  assign c_fill_addr   = miss_start ? rd_addr : fill_addr_q;
  assign c_fill_way    = miss_start ? c_lk_victim : fill_way_q;
  assign c_fill_we     = fill_q && beat_valid;
  assign c_fill_word   = beat_word;
  assign c_fill_data   = beat_data;
  assign c_fill_done   = fill_q && beat_valid && beat_last;
  assign prng_next     = miss_start;
  assign rd_start      = miss_start;
  assign rd_start_addr = rd_addr;

  assign c_wr_en   = coh_write;
  assign c_wr_addr = coh_wr_addr;
  assign c_wr_way  = coh_wr_way;
  assign c_wr_data = coh_wr_data;
  assign c_wr_strb = coh_wr_strb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= M_IDLE;
      fill_q       <= 1'b0;
      fill_addr_q  <= '0;
      fill_way_q   <= '0;
      flush_pend_q <= 1'b0;
      got_q        <= '0;
    end else begin
      if (miss_start)     got_q <= '0;
      else if (c_fill_we) got_q[beat_word] <= 1'b1;
      state_q <= state_d;
      if (miss_start) begin
        fill_q      <= 1'b1;
        fill_addr_q <= rd_addr;
        fill_way_q  <= c_lk_victim;
      end else if (c_fill_done) begin
        fill_q <= 1'b0;
      end
      if (flush_req)    flush_pend_q <= 1'b1;
      else if (c_flush) flush_pend_q <= 1'b0;
    end
  end

  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n) !(coh_write && c_fill_we));
  a_one_src: assert property (@(posedge clk) disable iff (!rst_n) !(rd_req && coh_lookup));
endmodule
