// bus_demuxer: routes an rVEX bus request to one of NUM_SLAVES slaves by
// address.
//
// Slave i owns the address range [SLV_BASE[i], SLV_BASE[i] + SLV_SIZE[i]).
// The first matching range wins; a request that matches no range is answered
// in the same cycle with ack and fault. The response of the selected slave is
// passed back unchanged. Routing is combinational and adds no cycle.
//
// Address-based selection follows the document; the address map and the
// fault on unmapped addresses are this design's choices.
module bus_demuxer
  import rvex_bus_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 2,
  parameter logic [NUM_SLAVES-1:0][BUS_ADDR_W-1:0] SLV_BASE = {32'h8000_0000, 32'h0000_0000},
  parameter logic [NUM_SLAVES-1:0][BUS_ADDR_W-1:0] SLV_SIZE = {32'h8000_0000, 32'h8000_0000}
) (
  input  bus_mst_t mst_req,
  output bus_slv_t mst_rsp,
  output bus_mst_t slv_req [NUM_SLAVES],
  input  bus_slv_t slv_rsp [NUM_SLAVES]
);
  logic                  hit;
  int unsigned           sel;

  always_comb begin
    hit = 1'b0;
    sel = 0;
    for (int unsigned i = 0; i < NUM_SLAVES; i++) begin
      if (!hit && (mst_req.address - SLV_BASE[i]) < SLV_SIZE[i]) begin
        hit = 1'b1;
        sel = i;
      end
    end
    mst_rsp = BUS_SLV_IDLE;
    for (int unsigned i = 0; i < NUM_SLAVES; i++) begin
      slv_req[i] = BUS_MST_IDLE;
      if (hit && sel == i) begin
        slv_req[i] = mst_req;
        mst_rsp    = slv_rsp[i];
      end
    end
    if (!hit && bus_req(mst_req)) begin
      mst_rsp.ack   = 1'b1;
      mst_rsp.fault = 1'b1;
    end
  end
endmodule
