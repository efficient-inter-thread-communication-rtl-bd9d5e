// sync_unit: load-linked / store-conditional support on the shared rVEX bus.
//
// The unit sits after the arbiter, where the requests of all contexts are
// merged, and only acts on requests with the synchronize flag set; every
// other request passes through combinationally, as if the unit were absent.
//
//  * Load-linked (synchronized read): forwarded unchanged. When it completes
//    without fault, the link register of its source is loaded with the word
//    address (address >> GRANULARITY) and marked valid, overwriting whatever
//    that source had linked before.
//  * Store-conditional (synchronized write): held back for one cycle while
//    the link register of its source is compared with the address. If the
//    link is valid and matches, the write is forwarded; when it completes
//    without fault every link register holding that address is invalidated
//    and read_data returns SC_SUCCESS. Otherwise the write is not performed
//    and the unit itself acks with read_data = SC_FAIL and fault low.
//  * link_flush[s] invalidates the link register of source s (used when a
//    context is interrupted).
//
// Rejected store-conditionals and ordinary stores do not touch the link
// registers. Latency: a store-conditional costs one cycle more than a store;
// everything else costs nothing extra.
//
// From the document: acting only on the synchronize flag, granularity that
// ignores the two low address bits by default, one link register that each
// load-linked overwrites, invalidation only by a successful
// store-conditional to the same address, the one-cycle delay, the result on
// read_data and the per-context flush. This design's choices: one link
// register per source (indexed by the source field), the 1/0 success
// encoding and setting the link when the load-linked completes.
module sync_unit
  import rvex_bus_pkg::*;
#(
  parameter int unsigned NUM_SOURCES = 4,
  parameter int unsigned GRANULARITY = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_SOURCES-1:0] link_flush,
  input  bus_mst_t               mst_req,
  output bus_slv_t               mst_rsp,
  output bus_mst_t               slv_req,
  input  bus_slv_t               slv_rsp
);
  localparam int unsigned LW = BUS_ADDR_W - GRANULARITY;
  localparam int unsigned SW = (NUM_SOURCES > 1) ? $clog2(NUM_SOURCES) : 1;

  typedef enum logic [1:0] {S_IDLE, S_FORWARD, S_REJECT} sc_state_e;

  logic [NUM_SOURCES-1:0]        link_valid_q;
  logic [NUM_SOURCES-1:0][LW-1:0] link_addr_q;
  sc_state_e                     state_q, state_d;

  logic          is_ll, is_sc;
  logic [LW-1:0] req_line;
  logic [SW-1:0] src;
  logic          link_ok;

  assign is_ll    = mst_req.read_enable  && mst_req.flags.synchronize;
  assign is_sc    = mst_req.write_enable && mst_req.flags.synchronize;
  assign req_line = mst_req.address[BUS_ADDR_W-1:GRANULARITY];
  assign src      = SW'(mst_req.source);
  assign link_ok  = (mst_req.source < NUM_SOURCES) && link_valid_q[src]
                    && (link_addr_q[src] == req_line);

  always_comb begin
    slv_req = mst_req;
    mst_rsp = slv_rsp;
    state_d = state_q;
    if (is_sc) begin
      unique case (state_q)
        S_IDLE: begin
          // Check cycle: nothing is forwarded yet.
          slv_req = BUS_MST_IDLE;
          mst_rsp = BUS_SLV_IDLE;
          mst_rsp.busy = 1'b1;
          state_d = link_ok ? S_FORWARD : S_REJECT;
        end
        S_FORWARD: begin
          if (!slv_rsp.fault) mst_rsp.read_data = SC_SUCCESS;
          if (slv_rsp.ack) state_d = S_IDLE;
        end
        S_REJECT: begin
          slv_req = BUS_MST_IDLE;
          mst_rsp = BUS_SLV_IDLE;
          mst_rsp.ack       = 1'b1;
          mst_rsp.read_data = SC_FAIL;
          state_d = S_IDLE;
        end
        default: state_d = S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      link_valid_q <= '0;
      link_addr_q  <= '0;
    end else begin
      state_q <= state_d;
      if (is_ll && slv_rsp.ack && !slv_rsp.fault && mst_req.source < NUM_SOURCES) begin
        link_valid_q[src] <= 1'b1;
        link_addr_q[src]  <= req_line;
      end
      if (is_sc && state_q == S_FORWARD && slv_rsp.ack && !slv_rsp.fault) begin
        for (int unsigned s = 0; s < NUM_SOURCES; s++)
          if (link_addr_q[s] == req_line) link_valid_q[s] <= 1'b0;
      end
      for (int unsigned s = 0; s < NUM_SOURCES; s++)
        if (link_flush[s]) link_valid_q[s] <= 1'b0;
    end
  end

  a_rw_excl: assert property (@(posedge clk) disable iff (!rst_n)
               !(mst_req.read_enable && mst_req.write_enable));
  a_ack_busy: assert property (@(posedge clk) disable iff (!rst_n)
               !(mst_rsp.ack && mst_rsp.busy));
endmodule
