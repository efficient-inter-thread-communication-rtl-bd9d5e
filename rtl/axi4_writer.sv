// axi4_writer: single-word writes on the AXI4 write channels; a write-back
// buffer of depth one.
//
// A pulse on wr_start (allowed only while busy is low) latches one word with
// its byte strobe. From the next cycle the write address and write data are
// offered together as a one-beat INCR burst; once both are accepted the
// writer waits for the write response. busy is high from the cycle after
// wr_start until the response arrives. To the write manager the write is
// complete as soon as it is latched; only the next write has to wait for
// busy to fall. While busy, mutex_busy and mutex_addr tell the AXI4 reader
// which address is in flight, so that a read of that line waits until the
// memory holds the new value.
//
// The depth-one buffer, acting as if the write completed at once, the
// assumption that writes never fail and the mutex follow the document; the
// response is accepted whatever its code. Channel timing is this design's
// choice.
module axi4_writer
  import axi4_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_start,
  input  logic [AXI_ADDR_W-1:0] wr_addr,
  input  logic [AXI_DATA_W-1:0] wr_data,
  input  logic [AXI_STRB_W-1:0] wr_strb,
  output logic                  busy,
  output logic                  mutex_busy,
  output logic [AXI_ADDR_W-1:0] mutex_addr,
  // AXI4 write channels
  output logic [AXI_ADDR_W-1:0] aw_addr,
  output logic [7:0]            aw_len,
  output logic [2:0]            aw_size,
  output axi_burst_e            aw_burst,
  output logic                  aw_valid,
  input  logic                  aw_ready,
  output logic [AXI_DATA_W-1:0] w_data,
  output logic [AXI_STRB_W-1:0] w_strb,
  output logic                  w_last,
  output logic                  w_valid,
  input  logic                  w_ready,
  input  logic                  b_valid,
  output logic                  b_ready
);
  localparam int unsigned BYTE_W = $clog2(AXI_STRB_W);

  typedef enum logic [1:0] {W_IDLE, W_SEND, W_RESP} wstate_e;
  wstate_e               state_q;
  logic [AXI_ADDR_W-1:0] addr_q;
  logic [AXI_DATA_W-1:0] data_q;
  logic [AXI_STRB_W-1:0] strb_q;
  logic                  aw_pend_q, w_pend_q;

  assign aw_addr  = {addr_q[AXI_ADDR_W-1:BYTE_W], {BYTE_W{1'b0}}};
  assign aw_len   = 8'd0;
  assign aw_size  = 3'(BYTE_W);
  assign aw_burst = BURST_INCR;
  assign aw_valid = (state_q == W_SEND) && aw_pend_q;
  assign w_data   = data_q;
  assign w_strb   = strb_q;
  assign w_last   = 1'b1;
  assign w_valid  = (state_q == W_SEND) && w_pend_q;
  assign b_ready  = (state_q == W_RESP);

  assign busy       = (state_q != W_IDLE);
  assign mutex_busy = busy;
  assign mutex_addr = addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= W_IDLE;
      addr_q    <= '0;
      data_q    <= '0;
      strb_q    <= '0;
      aw_pend_q <= 1'b0;
      w_pend_q  <= 1'b0;
    end else begin
      unique case (state_q)
        W_IDLE: if (wr_start) begin
          addr_q    <= wr_addr;
          data_q    <= wr_data;
          strb_q    <= wr_strb;
          aw_pend_q <= 1'b1;
          w_pend_q  <= 1'b1;
          state_q   <= W_SEND;
        end
        W_SEND: begin
          if (aw_valid && aw_ready) aw_pend_q <= 1'b0;
          if (w_valid && w_ready)   w_pend_q  <= 1'b0;
          if ((!aw_pend_q || aw_ready) && (!w_pend_q || w_ready)) state_q <= W_RESP;
        end
        W_RESP: if (b_valid) state_q <= W_IDLE;
        default: state_q <= W_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) wr_start |-> state_q == W_IDLE);
endmodule
