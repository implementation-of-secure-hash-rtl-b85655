// hash_top: the two hash engines side by side, each with its own ports.
//   SHA-1   : sha1_system, a RAM-mapped engine. The CPU writes padded
//             512-bit blocks into the RAM, raises execute (first block) or
//             pulses new_block (later blocks), waits for
//             sha1_digest_ready and reads the digest from words 0x20-0x24.
//   Groestl : groestl_256, fed a padded 512-bit block per block_valid
//             pulse and asked for the 256-bit digest with finalize.
// The engines share only the clock and the active-low reset.
module hash_top (
  input  logic         clk,
  input  logic         rst_n,
  // SHA-1 system, CPU side of the shared RAM
  input  logic [7:0]   sha1_addr,
  input  logic         sha1_we,
  input  logic [31:0]  sha1_wdata,
  output logic [31:0]  sha1_rdata,
  input  logic         sha1_execute,
  input  logic         sha1_new_block,
  output logic         sha1_digest_ready,
  // Groestl-256 core
  input  logic         grs_block_valid,
  input  logic         grs_first,
  input  logic [511:0] grs_msg,
  input  logic         grs_finalize,
  output logic         grs_busy,
  output logic         grs_digest_valid,
  output logic [255:0] grs_digest
);

  sha1_system u_sha1_system (
    .clk, .rst_n,
    .cpu_addr(sha1_addr), .cpu_we(sha1_we), .cpu_wdata(sha1_wdata),
    .cpu_rdata(sha1_rdata), .execute(sha1_execute), .new_block(sha1_new_block),
    .sha1_digest_ready
  );

  groestl_256 u_groestl (
    .clk, .rst_n,
    .block_valid(grs_block_valid), .first(grs_first), .msg(grs_msg),
    .finalize(grs_finalize), .busy(grs_busy), .digest_valid(grs_digest_valid),
    .digest(grs_digest)
  );

endmodule
