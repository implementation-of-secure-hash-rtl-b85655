// sha1_core: the SHA-1 module. It hashes padded 512-bit message blocks
// that the CPU has placed in a shared RAM and writes the 160-bit digest
// back into that RAM.
// Inside: Control (sequencing and handshake), Read Data (RAM addresses of
// W0..W15), Calculate Digest (one SHA-1 step per clock) and Write Digest
// (stores H0..H4). The RAM port is shared: Read Data drives the address
// while a block is read, Write Digest while the digest is stored.
// Handshake: execute high starts a message at block area 0; ready
// (sha1_digest_ready) rises when the digest of the block is in the RAM;
// a new_block pulse then hashes the next block from the other area with
// the current digest as chaining value; execute low resets the module.
// Latency: ready rises 88 clocks after the edge that samples execute or
// the new_block rising edge.
module sha1_core (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        execute,
  input  logic        new_block,
  output logic        ready,
  // RAM port
  output logic [7:0]  mem_addr,
  output logic        mem_we,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata
);

  logic init_h, load, step_en, update_h, wr_start, prefetch, running, blk_sel;
  logic wr_done, rd_en, wr_we;
  logic [6:0] t;
  logic [4:0][31:0] h;
  logic [7:0] rd_addr, wr_addr;

  sha1_control u_control (
    .clk, .rst_n, .execute, .new_block, .t, .wr_done,
    .init_h, .load, .step_en, .update_h, .wr_start, .prefetch, .running,
    .blk_sel, .ready
  );

  sha1_read_data u_read (
    .prefetch, .running, .blk_sel, .t, .rd_en, .rd_addr
  );

  sha1_calc_digest u_calc (
    .clk, .rst_n, .init_h, .load, .step_en, .update_h, .w_in(mem_rdata),
    .t, .h
  );

  sha1_write_digest #(.DIGEST_BASE(sha1_pkg::DIGEST_BASE)) u_write (
    .clk, .rst_n, .start(wr_start), .h, .we(wr_we), .addr(wr_addr),
    .wdata(mem_wdata), .done(wr_done)
  );

  assign mem_we   = wr_we;
  assign mem_addr = wr_we ? wr_addr : rd_addr;

  no_read_during_write : assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && wr_we));

endmodule
