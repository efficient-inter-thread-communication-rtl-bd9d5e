// Bus-master tasks shared by the testbenches. The including module must
// declare clk, and bus_mst_t m_req[] / bus_slv_t m_rsp[] arrays.
// A request is presented at a falling edge and held until ack; the cycle
// count includes the cycle in which ack is seen.
task automatic bus_access(input int i, input logic wr, input logic sync,
                          input logic [31:0] addr, input logic [31:0] wdata,
                          input logic [3:0] mask, output logic [31:0] rdata,
                          output logic fault, output int cycles);
  @(negedge clk);
  m_req[i] = '0;
  m_req[i].address           = addr;
  m_req[i].write_data        = wdata;
  m_req[i].write_mask        = mask;
  m_req[i].read_enable       = !wr;
  m_req[i].write_enable      = wr;
  m_req[i].flags.synchronize = sync;
  cycles = 0;
  forever begin
    #1;
    cycles++;
    if (m_rsp[i].ack) break;
    @(negedge clk);
  end
  rdata = m_rsp[i].read_data;
  fault = m_rsp[i].fault;
  @(negedge clk);
  m_req[i] = '0;
endtask

task automatic bus_read(input int i, input logic [31:0] addr, output logic [31:0] rdata,
                        output int cycles);
  logic f;
  bus_access(i, 1'b0, 1'b0, addr, '0, '0, rdata, f, cycles);
endtask

task automatic bus_write(input int i, input logic [31:0] addr, input logic [31:0] wdata,
                         input logic [3:0] mask, output int cycles);
  logic [31:0] d;
  logic f;
  bus_access(i, 1'b1, 1'b0, addr, wdata, mask, d, f, cycles);
endtask

function automatic logic [31:0] init_word(input logic [31:0] byte_addr);
  return {byte_addr[31:2], 2'b00} ^ 32'h5A5A_0000;
endfunction
