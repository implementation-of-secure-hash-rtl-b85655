// sha1_read_data: Read Data block of the SHA-1 module. It produces the RAM
// address of the next message word, one word ahead of the step that uses
// it, because the block RAM returns data one clock after the address.
// During the prefetch cycle it addresses word 0; during step t (t < 15) it
// addresses word t+1. Word j of message area blk_sel sits at
// BLOCK0_BASE + j or BLOCK1_BASE + j (0x00 + j and 0x10 + j). rd_en is
// high while the block still needs words (prefetch and t < 15); the
// Control block disables it after that. Combinational. Reading only the
// first 16 words follows the original hardware; the one-word lead is this
// design's answer to the RAM's read latency.
module sha1_read_data
  import sha1_pkg::*;
(
  input  logic       prefetch,
  input  logic       running,
  input  logic       blk_sel,
  input  logic [6:0] t,
  output logic       rd_en,
  output logic [7:0] rd_addr
);

  logic [3:0] word;

  always_comb begin
    rd_en = prefetch || (running && t < 7'd15);
    word  = prefetch ? 4'd0 : 4'(t + 7'd1);
    rd_addr = rd_en ? (blk_sel ? BLOCK1_BASE : BLOCK0_BASE) + {4'h0, word} : BLOCK0_BASE;
  end

endmodule
