// axi4_reader: fetches one L2 cache line over the AXI4 read channels.
//
// A pulse on rd_start with rd_addr (byte address of the requested word)
// starts a read of the aligned line that holds it. The request is a wrapping
// burst of WPL beats whose start address is the requested word, so the
// requested word is the first beat to come back and the rest of the line
// follows, wrapping around the line boundary. Each returned beat is handed
// to the read manager on beat_valid with its word index inside the line;
// beat_first marks the requested word and beat_last the end of the line.
//
// The mutex input protects read-after-write ordering: while the AXI4 writer
// still has a write outstanding to the same line (mutex_busy with a matching
// mutex_addr), the read address is not issued. Otherwise ar_valid is raised
// in the same cycle as rd_start, so the read costs no extra cycle in the
// reader. r_ready is held high during the burst. busy is high from rd_start
// until the last beat.
//
// Wrapping bursts and the mutex follow the document; the start in the same
// cycle and the per-beat interface are this design's choices. A line of one
// word uses an INCR burst of length 1, since AXI4 wrapping bursts need at
// least two beats.
module axi4_reader
  import axi4_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned WPL    = LINE_BYTES / AXI_STRB_W,
  localparam int unsigned WOFF_W = (WPL > 1) ? $clog2(WPL) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rd_start,
  input  logic [AXI_ADDR_W-1:0] rd_addr,
  output logic                  busy,
  input  logic                  mutex_busy,
  input  logic [AXI_ADDR_W-1:0] mutex_addr,
  output logic                  beat_valid,
  output logic [WOFF_W-1:0]     beat_word,
  output logic [AXI_DATA_W-1:0] beat_data,
  output logic                  beat_first,
  output logic                  beat_last,
  // AXI4 read channels
  output logic [AXI_ADDR_W-1:0] ar_addr,
  output logic [7:0]            ar_len,
  output logic [2:0]            ar_size,
  output axi_burst_e            ar_burst,
  output logic                  ar_valid,
  input  logic                  ar_ready,
  input  logic [AXI_DATA_W-1:0] r_data,
  input  logic                  r_last,
  input  logic                  r_valid,
  output logic                  r_ready
);
  localparam int unsigned LINE_LO = $clog2(LINE_BYTES);
  localparam int unsigned BYTE_W  = $clog2(AXI_STRB_W);

  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} rstate_e;
  rstate_e                state_q;
  logic [AXI_ADDR_W-1:0]  addr_q, cur_addr;
  logic [WOFF_W-1:0]      word_q;
  logic                   first_q;
  logic                   blocked;

  function automatic logic same_line(input logic [AXI_ADDR_W-1:0] a, input logic [AXI_ADDR_W-1:0] b);
    return (a >> LINE_LO) == (b >> LINE_LO);
  endfunction

  assign cur_addr = (state_q == R_IDLE) ? rd_addr : addr_q;
  assign blocked  = mutex_busy && same_line(mutex_addr, cur_addr);

  assign ar_addr  = {cur_addr[AXI_ADDR_W-1:BYTE_W], {BYTE_W{1'b0}}};
  assign ar_len   = 8'(WPL - 1);
  assign ar_size  = 3'(BYTE_W);
  assign ar_burst = (WPL > 1) ? BURST_WRAP : BURST_INCR;
  assign ar_valid = !blocked && ((state_q == R_IDLE && rd_start) || state_q == R_ADDR);
  assign r_ready  = (state_q == R_DATA);
  assign busy     = (state_q != R_IDLE);

  assign beat_valid = (state_q == R_DATA) && r_valid;
  assign beat_word  = word_q;
  assign beat_data  = r_data;
  assign beat_first = first_q;
  assign beat_last  = r_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= R_IDLE;
      addr_q  <= '0;
      word_q  <= '0;
      first_q <= 1'b0;
    end else begin
      unique case (state_q)
        R_IDLE: if (rd_start) begin
          addr_q  <= rd_addr;
          word_q  <= (WPL > 1) ? WOFF_W'(rd_addr >> BYTE_W) : '0;
          first_q <= 1'b1;
          state_q <= (ar_valid && ar_ready) ? R_DATA : R_ADDR;
        end
        R_ADDR: if (ar_valid && ar_ready) state_q <= R_DATA;
        R_DATA: if (r_valid) begin
          word_q  <= (WPL > 1) ? WOFF_W'(word_q + 1'b1) : '0;
          first_q <= 1'b0;
          if (r_last) state_q <= R_IDLE;
        end
        default: state_q <= R_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) rd_start |-> state_q == R_IDLE);
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
                 (ar_valid && !ar_ready) |=> (ar_valid && $stable(ar_addr)) || blocked);
endmodule
