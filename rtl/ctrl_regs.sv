// ctrl_regs: control registers between the host processor and the bridge.
//
// The host-side driver reserves a physically contiguous buffer in DDR and
// tells the bridge where it is; it can also flush the L2 cache and reseed its
// random number generator (done after a new program has been loaded into
// memory). This block holds those registers behind a simple synchronous
// register port (one access per cycle, read data registered):
//
//   0x00  BASE    address added to every rVEX address before it goes on AXI4
//   0x04  CTRL    write 1 to bit 0: flush L2 (one-cycle pulse)
//                 write 1 to bit 1: reseed the PRNG with SEED (one-cycle pulse)
//   0x08..0x14    SEED[31:0] .. SEED[127:96]
//
// The three functions follow the document; the register map and the port
// protocol are this design's choices, since the host interface is not
// specified.
module ctrl_regs (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         reg_we,
  input  logic         reg_re,
  input  logic [4:0]   reg_addr,
  input  logic [31:0]  reg_wdata,
  output logic [31:0]  reg_rdata,
  output logic [31:0]  base_addr,
  output logic         l2_flush,
  output logic         prng_reseed,
  output logic [127:0] prng_seed
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_addr   <= '0;
      prng_seed   <= '0;
      l2_flush    <= 1'b0;
      prng_reseed <= 1'b0;
      reg_rdata   <= '0;
    end else begin
      l2_flush    <= 1'b0;
      prng_reseed <= 1'b0;
      if (reg_we) begin
        unique case (reg_addr[4:2])
          3'd0: base_addr <= reg_wdata;
          3'd1: begin
            l2_flush    <= reg_wdata[0];
            prng_reseed <= reg_wdata[1];
          end
          3'd2: prng_seed[31:0]   <= reg_wdata;
          3'd3: prng_seed[63:32]  <= reg_wdata;
          3'd4: prng_seed[95:64]  <= reg_wdata;
          3'd5: prng_seed[127:96] <= reg_wdata;
          default: ;
        endcase
      end
      if (reg_re) begin
        unique case (reg_addr[4:2])
          3'd0:    reg_rdata <= base_addr;
          3'd2:    reg_rdata <= prng_seed[31:0];
          3'd3:    reg_rdata <= prng_seed[63:32];
          3'd4:    reg_rdata <= prng_seed[95:64];
          3'd5:    reg_rdata <= prng_seed[127:96];
          default: reg_rdata <= '0;
        endcase
      end
    end
  end
endmodule
