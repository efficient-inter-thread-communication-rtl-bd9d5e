// rvex_bus_pkg: types shared by every unit on the rVEX memory bus.
//
// The rVEX bus is a simple single-outstanding master/slave bus with two
// channels. The master channel carries address, write data, a byte write
// mask, read/write enables and a set of flags; the slave channel returns read
// data and the fault, busy and ack bits. Two additions support atomic
// operations: a "synchronize" flag that marks load-linked (read) and
// store-conditional (write) requests, and a 32-bit source field that names the
// bus master, filled in by the arbiter.
//
// Handshake used throughout this design (the bus rules themselves come from
// the document, the exact cycle semantics are this design's choice): a master
// presents a request by raising read_enable or write_enable and holds every
// master field stable until a cycle in which the slave raises ack. That cycle
// completes the request; read data and fault are valid in it. The master may
// present the next request in the following cycle. busy is high while a
// presented request is still being worked on. read_enable and write_enable
// are never high together, and ack and busy are never high together.
package rvex_bus_pkg;

  localparam int unsigned BUS_ADDR_W = 32;
  localparam int unsigned BUS_DATA_W = 32;
  localparam int unsigned BUS_MASK_W = BUS_DATA_W / 8;
  localparam int unsigned BUS_SRC_W  = 32;

  typedef struct packed {
    logic synchronize;   // request is a load-linked / store-conditional
  } bus_flags_t;

  typedef struct packed {
    logic [BUS_ADDR_W-1:0] address;
    logic [BUS_DATA_W-1:0] write_data;
    logic [BUS_MASK_W-1:0] write_mask;
    logic                  read_enable;
    logic                  write_enable;
    bus_flags_t            flags;
    logic [BUS_SRC_W-1:0]  source;
  } bus_mst_t;

  typedef struct packed {
    logic [BUS_DATA_W-1:0] read_data;
    logic                  fault;
    logic                  busy;
    logic                  ack;
  } bus_slv_t;

  localparam bus_mst_t BUS_MST_IDLE = '0;
  localparam bus_slv_t BUS_SLV_IDLE = '0;

  function automatic logic bus_req(input bus_mst_t m);
    return m.read_enable | m.write_enable;
  endfunction

  // Value returned on read_data for a store-conditional.
  localparam logic [BUS_DATA_W-1:0] SC_SUCCESS = 32'd1;
  localparam logic [BUS_DATA_W-1:0] SC_FAIL    = 32'd0;

endpackage
