// bus_halfstage: one-cycle delay unit on the rVEX bus.
//
// The request from the master is registered before it reaches the slave, so
// a long timing path (processor, L1 cache, L2 cache) is cut in two at the
// cost of one cycle on every transaction. The response path is not
// registered: ack, busy, fault and read_data pass straight back (busy therefore rises only once the slave sees the request). In the cycle
// the slave acks, the register loads an idle request instead of the
// (still presented) old one, so the slave never sees a request twice; the
// master's next request reaches the slave one cycle after it is presented.
//
// The one-cycle delay of the request follows the document; how the register
// is cleared is this design's choice.
module bus_halfstage
  import rvex_bus_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_mst_t mst_req,
  output bus_slv_t mst_rsp,
  output bus_mst_t slv_req,
  input  bus_slv_t slv_rsp
);
  bus_mst_t req_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           req_q <= BUS_MST_IDLE;
    else if (slv_rsp.ack) req_q <= BUS_MST_IDLE;
    else                  req_q <= mst_req;
  end

  assign slv_req = req_q;

  // The response depends only on the registered request, never
  // combinationally on mst_req: busy stays low in the first cycle.
  assign mst_rsp = slv_rsp;
endmodule
