// axi4_pkg: AXI4 master-side request and slave-side response bundles used by
// the rVEX-to-AXI4 bridge.
//
// Only the signals the bridge drives or reads are carried: no IDs (one read
// and one write outstanding at most), no QoS, cache, lock or protection
// fields. Address width is 32 bits and data width 64 bits, the width of the
// processing system's memory port that sets the L2 cache word size. Every
// channel uses the valid/ready handshake: a transfer happens on the rising
// edge where both are high.
package axi4_pkg;

  localparam int unsigned AXI_ADDR_W = 32;
  localparam int unsigned AXI_DATA_W = 64;
  localparam int unsigned AXI_STRB_W = AXI_DATA_W / 8;

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } axi_burst_e;

  typedef struct packed {
    // read address channel
    logic [AXI_ADDR_W-1:0] ar_addr;
    logic [7:0]            ar_len;
    logic [2:0]            ar_size;
    axi_burst_e            ar_burst;
    logic                  ar_valid;
    // read data channel
    logic                  r_ready;
    // write address channel
    logic [AXI_ADDR_W-1:0] aw_addr;
    logic [7:0]            aw_len;
    logic [2:0]            aw_size;
    axi_burst_e            aw_burst;
    logic                  aw_valid;
    // write data channel
    logic [AXI_DATA_W-1:0] w_data;
    logic [AXI_STRB_W-1:0] w_strb;
    logic                  w_last;
    logic                  w_valid;
    // write response channel
    logic                  b_ready;
  } axi_req_t;

  typedef struct packed {
    logic                  ar_ready;
    logic [AXI_DATA_W-1:0] r_data;
    logic [1:0]            r_resp;
    logic                  r_last;
    logic                  r_valid;
    logic                  aw_ready;
    logic                  w_ready;
    logic [1:0]            b_resp;
    logic                  b_valid;
  } axi_rsp_t;

endpackage
