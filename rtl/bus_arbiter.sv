// bus_arbiter: merges NUM_MASTERS rVEX bus masters onto one slave port.
//
// Requests are granted round-robin: when the slave side is free, the first
// requesting master after the one granted last wins. The grant is forwarded in
// the same cycle, so the arbiter adds no latency to an uncontended request,
// and it is held until the slave acks. The arbiter writes the index of the
// granted master into the request's source field, which the synchronization
// unit uses to tell contexts apart. Waiting masters see busy=1 and ack=0.
//
// Round-robin order and stamping the source after the arbiter follow the
// document; forwarding in the cycle of the grant and using the port index as
// source ID are this design's choices.
module bus_arbiter
  import rvex_bus_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_mst_t mst_req [NUM_MASTERS],
  output bus_slv_t mst_rsp [NUM_MASTERS],
  output bus_mst_t slv_req,
  input  bus_slv_t slv_rsp
);
  localparam int unsigned IW = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1;

  logic          locked_q;
  logic [IW-1:0] owner_q, last_q, sel;
  logic          any_req;

  // Round-robin pick: first requester strictly after last_q.
  always_comb begin
    int unsigned idx;
    idx     = 0;
    sel     = owner_q;
    any_req = 1'b0;
    if (locked_q) begin
      any_req = bus_req(mst_req[owner_q]);
    end else begin
      for (int unsigned k = 1; k <= NUM_MASTERS; k++) begin
        idx = (int'(last_q) + k) % NUM_MASTERS;
        if (!any_req && bus_req(mst_req[idx])) begin
          any_req = 1'b1;
          sel     = IW'(idx);
        end
      end
    end
  end

  always_comb begin
    slv_req = BUS_MST_IDLE;
    if (any_req) begin
      slv_req        = mst_req[sel];
      slv_req.source = BUS_SRC_W'(sel);
    end
    for (int unsigned i = 0; i < NUM_MASTERS; i++) begin
      mst_rsp[i]      = BUS_SLV_IDLE;
      mst_rsp[i].busy = bus_req(mst_req[i]);
      if (any_req && sel == IW'(i)) mst_rsp[i] = slv_rsp;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      owner_q  <= '0;
      last_q   <= IW'(NUM_MASTERS - 1);
    end else if (any_req) begin
      locked_q <= !slv_rsp.ack;
      owner_q  <= sel;
      last_q   <= sel;
    end else begin
      locked_q <= 1'b0;
    end
  end

  // A granted master must keep its request until the slave acks.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
            locked_q |-> bus_req(mst_req[owner_q]));
endmodule
