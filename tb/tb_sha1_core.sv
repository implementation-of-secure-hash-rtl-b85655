// tb_sha1_core: runs the SHA-1 module against a memory model of the
// shared RAM (one-cycle read latency). Message blocks are placed
// alternately in areas 0x00 and 0x10; the next block is stored while the
// current one is being hashed. After each block the digest in 0x20..0x24
// is compared with an independent SHA-1 model, the clocks to ready are
// checked (88), and the message areas must be left unchanged.
module tb_sha1_core;
  import sha1_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, execute = 0, new_block = 0, ready;
  logic [7:0] mem_addr;
  logic mem_we;
  logic [31:0] mem_wdata, mem_rdata;
  logic [31:0] mem [256];

  always #5 clk = ~clk;

  sha1_core dut (.clk, .rst_n, .execute, .new_block, .ready, .mem_addr, .mem_we,
                 .mem_wdata, .mem_rdata);

  always_ff @(posedge clk) begin
    mem_rdata <= mem[mem_addr];
    if (mem_we) mem[mem_addr] <= mem_wdata;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input blk_t b, input int area);
    for (int i = 0; i < 16; i++) mem[16 * area + i] = b[i];
  endtask

  task automatic hash(input blk_t blks [], input string what);
    dig_t e = iv();
    int c;
    put(blks[0], 0);
    execute <= 1;
    foreach (blks[k]) begin
      if (k > 0) begin
        new_block <= 1;
        repeat (5) @(posedge clk);
        new_block <= 0;
        c = 4;
      end else begin
        @(posedge clk);
        execute <= 1;
        c = 0;
      end
      // store the next block while this one is hashed
      @(posedge clk);
      c++;
      if (k + 1 < blks.size()) put(blks[k+1], (k + 1) % 2);
      do begin @(posedge clk); #1; c++; end while (!ready && c < 300);
      checks++;
      if (c != 88) begin failures++; $display("%s block %0d: ready after %0d clocks", what, k, c); end
      e = compress(e, blks[k]);
      checks++;
      for (int i = 0; i < 5; i++)
        if (mem[8'h20 + i] !== e[i]) begin
          failures++;
          $display("%s block %0d: H%0d got %h exp %h", what, k, i, mem[8'h20 + i], e[i]);
          break;
        end
      checks++;
      for (int i = 0; i < 16; i++)
        if (mem[16 * (k % 2) + i] !== blks[k][i]) begin
          failures++; $display("message area overwritten"); break;
        end
    end
    execute <= 0;
    @(posedge clk);
    #1;
    checks++;
    if (ready) begin failures++; $display("ready still high after execute low"); end
    $display("%s: %0d block(s) %h%h%h%h%h", what, blks.size(), e[0], e[1], e[2], e[3], e[4]);
  endtask

  initial begin
    logic [7:0] m [64];
    blk_t r [];
    blk_t abc [];
    for (int i = 0; i < 256; i++) mem[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    m[0] = "a"; m[1] = "b"; m[2] = "c";
    abc = new[1];
    abc[0] = pad1(m, 3);
    hash(abc, "abc");
    for (int n = 1; n <= 4; n++) begin
      r = new[n];
      foreach (r[i]) for (int k = 0; k < 16; k++) r[i][k] = $urandom;
      hash(r, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
