// sha1_system: the SHA-1 hash unit as a CPU sees it, a RAM with a hash
// engine behind it. A dual-port RAM holds two 512-bit message areas
// (words 0x00-0x0F and 0x10-0x1F) and the 160-bit digest (0x20-0x24, H0
// first). The CPU uses port A; the SHA-1 module uses port B. While the
// module hashes one area the CPU may fill the other.
// CPU side: cpu_addr / cpu_we / cpu_wdata / cpu_rdata (one-cycle read
// latency), execute, new_block and sha1_digest_ready as in sha1_core.
// Two message areas and a digest area in one RAM follow the original hardware; the
// exact addresses are this design's reading of its simulation.
module sha1_system #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic              cpu_we,
  input  logic [DATA_W-1:0] cpu_wdata,
  output logic [DATA_W-1:0] cpu_rdata,
  input  logic              execute,
  input  logic              new_block,
  output logic              sha1_digest_ready
);

  logic [7:0]  b_addr;
  logic        b_we;
  logic [31:0] b_wdata, b_rdata;
  logic [DATA_W-1:0] b_rdata_w;

  dual_port_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram (
    .clk,
    .a_addr(cpu_addr), .a_we(cpu_we), .a_wdata(cpu_wdata), .a_rdata(cpu_rdata),
    .b_addr(ADDR_W'(b_addr)), .b_we, .b_wdata(DATA_W'(b_wdata)), .b_rdata(b_rdata_w)
  );

  assign b_rdata = 32'(b_rdata_w);

  sha1_core u_sha1 (
    .clk, .rst_n, .execute, .new_block, .ready(sha1_digest_ready),
    .mem_addr(b_addr), .mem_we(b_we), .mem_wdata(b_wdata), .mem_rdata(b_rdata)
  );

endmodule
