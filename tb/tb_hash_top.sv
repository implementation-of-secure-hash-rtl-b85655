// tb_hash_top: end-to-end test of the top level with default parameters.
// Both engines work at the same time:
//  - a CPU model hashes SHA-1 messages through the shared RAM: blocks
//    written while the previous one is hashed, chaining with new_block,
//    digests read back from 0x20..0x24, and one message aborted halfway
//    by lowering execute and then hashed again from the start;
//  - a host model feeds padded Groestl-256 messages of one to three
//    blocks and asks for the output transformation.
// Every digest is compared with independent models. The test counts how
// often each mechanism happened (SHA-1 chained block, write during
// hashing, abort, use of each message area; Groestl P pass, Q pass,
// chained block, output transformation) and counts a failure for any
// mechanism that never happened.
module tb_hash_top;
  import sha1_ref_pkg::*;
  import groestl_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0]   sha1_addr = 0;
  logic         sha1_we = 0, sha1_execute = 0, sha1_new_block = 0, sha1_digest_ready;
  logic [31:0]  sha1_wdata = 0, sha1_rdata;
  logic         grs_block_valid = 0, grs_first = 0, grs_finalize = 0;
  logic         grs_busy, grs_digest_valid;
  logic [511:0] grs_msg = '0;
  logic [255:0] grs_digest;
  bit sha1_done = 0, grs_done = 0;

  int n_chain = 0, n_overlap = 0, n_abort = 0, n_area0 = 0, n_area1 = 0;
  int n_p = 0, n_q = 0, n_grs_chain = 0, n_out = 0;

  always #5 clk = ~clk;

  hash_top dut (.*);

  // mechanism counters taken from the engines' own control signals
  always_ff @(posedge clk) begin
    if (dut.u_sha1_system.u_sha1.u_control.prefetch) begin
      if (dut.u_sha1_system.u_sha1.u_control.blk_sel) n_area1 <= n_area1 + 1;
      else n_area0 <= n_area0 + 1;
    end
    if (sha1_we && !sha1_digest_ready && dut.u_sha1_system.u_sha1.u_control.running)
      n_overlap <= n_overlap + 1;
    if (dut.u_groestl.u_round.done && dut.u_groestl.rnd == 8'd9) begin
      case (dut.u_groestl.phase)
        0: n_p <= n_p + 1;
        1: n_q <= n_q + 1;
        default: n_out <= n_out + 1;
      endcase
    end
    if (grs_block_valid && !grs_first) n_grs_chain <= n_grs_chain + 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- SHA-1 CPU model ----------------
  task automatic write_block(input blk_t b, input int area);
    for (int i = 0; i < 16; i++) begin
      sha1_addr <= 8'(16 * area + i); sha1_we <= 1; sha1_wdata <= b[i];
      @(posedge clk);
    end
    sha1_we <= 0;
  endtask

  task automatic sha1_hash(input blk_t blks [], input int abort_at);
    dig_t e = iv(), got;
    write_block(blks[0], 0);
    for (int k = 0; k < blks.size(); k++) begin
      if (k == 0) sha1_execute <= 1; else begin sha1_new_block <= 1; n_chain++; end
      @(posedge clk);
      fork
        begin repeat (4) @(posedge clk); sha1_new_block <= 0; end
        if (k + 1 < blks.size()) write_block(blks[k+1], (k + 1) % 2);
      join
      if (k == abort_at) begin
        repeat (20) @(posedge clk);
        sha1_execute <= 0;
        n_abort++;
        @(posedge clk);
        #1;
        checks++;
        if (sha1_digest_ready) begin failures++; $display("ready after abort"); end
        return;
      end
      while (!sha1_digest_ready) @(posedge clk);
      e = sha1_ref_pkg::compress(e, blks[k]);
    end
    for (int i = 0; i < 5; i++) begin
      sha1_addr <= 8'h20 + 8'(i);
      @(posedge clk);
      #1;
      got[i] = sha1_rdata;
    end
    sha1_execute <= 0;
    @(posedge clk);
    checks++;
    if (got != e) begin
      failures++;
      $display("SHA-1 digest %h%h%h%h%h exp %h%h%h%h%h", got[0], got[1], got[2], got[3],
               got[4], e[0], e[1], e[2], e[3], e[4]);
    end else $display("SHA-1 %0d block(s): %h%h%h%h%h", blks.size(), e[0], e[1], e[2], e[3], e[4]);
  endtask

  // ---------------- Groestl host model ----------------
  task automatic grs_hash(input logic [7:0] m [256], input int len);
    int n = nblocks(len);
    logic [511:0] h = 512'h100;
    logic [255:0] exp;
    for (int b = 0; b < n; b++) begin
      logic [511:0] blk = pad_block(m, len, b);
      h = groestl_ref_pkg::compress(h, blk, 10);
      grs_msg <= blk;
      grs_first <= (b == 0);
      grs_block_valid <= 1;
      @(posedge clk);
      grs_block_valid <= 0;
      grs_first <= 0;
      @(posedge clk);
      while (grs_busy) @(posedge clk);
    end
    exp = out_tf(h, 10);
    grs_finalize <= 1;
    @(posedge clk);
    grs_finalize <= 0;
    @(posedge clk);
    while (!grs_digest_valid) @(posedge clk);
    checks++;
    if (grs_digest !== exp) begin
      failures++;
      $display("Groestl len=%0d digest %h exp %h", len, grs_digest, exp);
    end else $display("Groestl-256 %0d byte(s): %h", len, grs_digest);
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("%-28s %0d", what, n);
  endtask

  initial begin
    blk_t msg [];
    logic [7:0] m [64];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      sha1_addr <= 8'(i); sha1_we <= 1; sha1_wdata <= 0;
      @(posedge clk);
    end
    sha1_we <= 0;
    m[0] = "a"; m[1] = "b"; m[2] = "c";
    msg = new[1];
    msg[0] = pad1(m, 3);
    sha1_hash(msg, -1);
    msg = new[3];
    foreach (msg[i]) for (int k = 0; k < 16; k++) msg[i][k] = $urandom;
    sha1_hash(msg, 1);
    sha1_hash(msg, -1);
    sha1_done = 1;
  end

  initial begin
    logic [7:0] g [256];
    for (int i = 0; i < 256; i++) g[i] = 8'($urandom);
    g[0] = "a"; g[1] = "b"; g[2] = "c";
    repeat (4) @(posedge clk);
    grs_hash(g, 3);
    grs_hash(g, 64);
    grs_hash(g, 150);
    grs_done = 1;
  end

  initial begin
    wait (sha1_done && grs_done);
    repeat (2) @(posedge clk);
    need(n_chain, "SHA-1 chained block");
    need(n_overlap, "SHA-1 write during hashing");
    need(n_abort, "SHA-1 abort");
    need(n_area0, "SHA-1 block from area 0");
    need(n_area1, "SHA-1 block from area 1");
    need(n_p, "Groestl P pass");
    need(n_q, "Groestl Q pass");
    need(n_grs_chain, "Groestl chained block");
    need(n_out, "Groestl output transform");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
