// dual_port_ram: true dual-port synchronous RAM, the shared memory between
// the CPU (port A) and the SHA-1 module (port B).
// Each port has an address, a write enable, write data and read data.
// A read returns the word at the address sampled on the previous clock edge
// (one cycle of latency, like an FPGA block RAM). A write to a port returns
// the old contents on that port's read data (read-first). Writing one
// address from both ports in the same cycle is not allowed; an assertion
// reports it. The depth follows the 8-bit address of the SHA-1 system.
module dual_port_ram #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  // port A
  input  logic [ADDR_W-1:0] a_addr,
  input  logic              a_we,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B
  input  logic [ADDR_W-1:0] b_addr,
  input  logic              b_we,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end

  write_collision : assert property (@(posedge clk) !(a_we && b_we && a_addr == b_addr))
    else $error("dual_port_ram: both ports write address %0h", a_addr);

endmodule
