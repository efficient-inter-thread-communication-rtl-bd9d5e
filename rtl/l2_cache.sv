// l2_cache: storage of the set-associative L2 cache inside the bridge.
//
// The cache is made of NUM_BLOCKS blocks (the associativity), each holding
// LINE_COUNT lines of LINE_BYTES bytes. A cache word is WORD_BYTES wide, the
// width of the AXI4 data bus. An address splits into
//   | tag | line index (log2 LINE_COUNT) | word in line | byte in word |.
// Tags and data live in RAM arrays with a synchronous read port and a write
// port; the per-line valid flag lives in flip-flops so that a flush clears the
// whole cache in one cycle. Size in bytes = NUM_BLOCKS * LINE_COUNT * LINE_BYTES.
//
// Ports (all synchronous to clk):
//  * lookup: lk_en with lk_addr reads the set. In the next cycle lk_hit,
//    lk_way and lk_rdata (the addressed word of the hitting block) are valid,
//    together with lk_victim, the block a miss should replace: the lowest
//    invalid block of the set if there is one, otherwise a block chosen by
//    the low bits of the random input rnd. With lk_pend the block lk_pend_way
//    counts as valid for this lookup: the read manager uses it to read a word
//    that has already arrived in a line that is still being filled.
//  * fill: fill_start with fill_addr/fill_way writes the tag and marks the
//    line invalid; fill_we writes one word (fill_word); fill_done marks the
//    line valid once all words are in.
//  * word write: wr_en updates one word of a hitting block under a byte strobe.
//  * flush: invalidates every line.
// The user must not issue fill and word writes in the same cycle.
//
// From the document: blocks as the unit of associativity, power-of-two
// parameters, tags and data in block RAM, one flag bit per line in a
// flip-flop, random replacement that fills empty places first, and the flush.
// The flag is used here as a valid bit; the exact port timing is this
// design's choice.
module l2_cache #(
  parameter int unsigned NUM_BLOCKS = 4,
  parameter int unsigned LINE_COUNT = 2048,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned WORD_BYTES = 8,
  parameter int unsigned ADDR_W     = 32,
  localparam int unsigned WPL    = LINE_BYTES / WORD_BYTES,
  localparam int unsigned BW     = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1,
  localparam int unsigned WOFF_W = (WPL > 1) ? $clog2(WPL) : 1,
  localparam int unsigned DATA_W = WORD_BYTES * 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic              lk_en,
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              lk_hit,
  output logic [BW-1:0]     lk_way,
  output logic [DATA_W-1:0] lk_rdata,
  output logic [BW-1:0]     lk_victim,
  input  logic [63:0]       rnd,
  input  logic              lk_pend,
  input  logic [BW-1:0]     lk_pend_way,
  // line fill
  input  logic              fill_start,
  input  logic [ADDR_W-1:0] fill_addr,
  input  logic [BW-1:0]     fill_way,
  input  logic              fill_we,
  input  logic [WOFF_W-1:0] fill_word,
  input  logic [DATA_W-1:0] fill_data,
  input  logic              fill_done,
  // word write on hit
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [BW-1:0]     wr_way,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [WORD_BYTES-1:0] wr_strb,
  // flush
  input  logic              flush
);
  localparam int unsigned BYTE_W = $clog2(WORD_BYTES);
  localparam int unsigned WBITS  = (WPL > 1) ? $clog2(WPL) : 0;
  localparam int unsigned IDX_W  = (LINE_COUNT > 1) ? $clog2(LINE_COUNT) : 1;
  localparam int unsigned IBITS  = (LINE_COUNT > 1) ? $clog2(LINE_COUNT) : 0;
  localparam int unsigned TAG_LO = BYTE_W + WBITS + IBITS;
  localparam int unsigned TAG_W  = ADDR_W - TAG_LO;
  localparam int unsigned DEPTH  = LINE_COUNT * WPL;
  localparam int unsigned DA_W   = $clog2(DEPTH > 1 ? DEPTH : 2);

  function automatic logic [IDX_W-1:0] idx_of(input logic [ADDR_W-1:0] a);
    if (LINE_COUNT > 1) return IDX_W'(a >> (BYTE_W + WBITS));
    else                return '0;
  endfunction
  function automatic logic [WOFF_W-1:0] word_of(input logic [ADDR_W-1:0] a);
    if (WPL > 1) return WOFF_W'(a >> BYTE_W);
    else         return '0;
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input logic [ADDR_W-1:0] a);
    return TAG_W'(a >> TAG_LO);
  endfunction
  function automatic logic [DA_W-1:0] daddr(input logic [IDX_W-1:0] i, input logic [WOFF_W-1:0] w);
    return DA_W'(DA_W'(i) * DA_W'(WPL) + DA_W'(w));
  endfunction

  logic [NUM_BLOCKS-1:0][LINE_COUNT-1:0] valid_q;
  logic [NUM_BLOCKS-1:0]                 lk_valid_q;
  logic [TAG_W-1:0]                      lk_tag_q  [NUM_BLOCKS];
  logic [DATA_W-1:0]                     lk_data_q [NUM_BLOCKS];
  logic [ADDR_W-1:0]                     lk_addr_q;

  // Valid flags (flip-flops).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q    <= '0;
      lk_valid_q <= '0;
      lk_addr_q  <= '0;
    end else begin
      if (lk_en) begin
        lk_addr_q <= lk_addr;
        for (int unsigned b = 0; b < NUM_BLOCKS; b++)
          lk_valid_q[b] <= valid_q[b][idx_of(lk_addr)] || (lk_pend && lk_pend_way == BW'(b));
      end
      if (fill_start) valid_q[fill_way][idx_of(fill_addr)] <= 1'b0;
      if (fill_done)  valid_q[fill_way][idx_of(fill_addr)] <= 1'b1;
      if (flush)      valid_q <= '0;
    end
  end

  // Tag and data RAMs, one pair per block.
  for (genvar b = 0; b < NUM_BLOCKS; b++) begin : g_block
    logic [TAG_W-1:0]  tag_mem  [LINE_COUNT];
    logic [DATA_W-1:0] data_mem [DEPTH];

    always_ff @(posedge clk) begin
      if (fill_start && fill_way == BW'(b))
        tag_mem[idx_of(fill_addr)] <= tag_of(fill_addr);
      if (lk_en)
        lk_tag_q[b] <= tag_mem[idx_of(lk_addr)];
    end

    always_ff @(posedge clk) begin
      if (fill_we && fill_way == BW'(b))
        data_mem[daddr(idx_of(fill_addr), fill_word)] <= fill_data;
      else if (wr_en && wr_way == BW'(b)) begin
        for (int unsigned k = 0; k < WORD_BYTES; k++)
          if (wr_strb[k])
            data_mem[daddr(idx_of(wr_addr), word_of(wr_addr))][k*8 +: 8] <= wr_data[k*8 +: 8];
      end
      if (lk_en)
        lk_data_q[b] <= data_mem[daddr(idx_of(lk_addr), word_of(lk_addr))];
    end
  end

  // Compare, select and victim choice on the registered lookup.
  always_comb begin
    lk_hit    = 1'b0;
    lk_way    = '0;
    lk_rdata  = lk_data_q[0];
    lk_victim = BW'(rnd % NUM_BLOCKS);
    for (int b = NUM_BLOCKS - 1; b >= 0; b--) begin
      if (!lk_valid_q[b]) lk_victim = BW'(b);
    end
    for (int unsigned b = 0; b < NUM_BLOCKS; b++) begin
      if (!lk_hit && lk_valid_q[b] && lk_tag_q[b] == tag_of(lk_addr_q)) begin
        lk_hit   = 1'b1;
        lk_way   = BW'(b);
        lk_rdata = lk_data_q[b];
      end
    end
  end

  a_no_write_clash: assert property (@(posedge clk) disable iff (!rst_n) !(fill_we && wr_en));
endmodule
