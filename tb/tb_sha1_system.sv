// tb_sha1_system: plays the CPU on port A of the SHA-1 system. For each
// message it writes block 0 into area 0x00, raises execute, writes the
// next block into the other area while the engine is busy, waits for
// sha1_digest_ready, reads the five digest words back through port A and
// compares them with an independent SHA-1 model, then pulses new_block
// for five clocks for the next block. Messages: "abc", a 64-byte message
// (two blocks, the second holding only padding and the length 0x200) and
// random multi-block messages. Also checks the 88-clock block latency.
module tb_sha1_system;
  import sha1_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0]  cpu_addr = 0;
  logic        cpu_we = 0, execute = 0, new_block = 0, ready;
  logic [31:0] cpu_wdata = 0, cpu_rdata;

  always #5 clk = ~clk;

  sha1_system dut (.clk, .rst_n, .cpu_addr, .cpu_we, .cpu_wdata, .cpu_rdata, .execute,
                   .new_block, .sha1_digest_ready(ready));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_block(input blk_t b, input int area);
    for (int i = 0; i < 16; i++) begin
      cpu_addr <= 8'(16 * area + i); cpu_we <= 1; cpu_wdata <= b[i];
      @(posedge clk);
    end
    cpu_we <= 0;
  endtask

  task automatic read_digest(output dig_t d);
    for (int i = 0; i < 5; i++) begin
      cpu_addr <= 8'h20 + 8'(i);
      @(posedge clk);
      #1;
      d[i] = cpu_rdata;
    end
  endtask

  task automatic hash(input blk_t blks [], input string what);
    dig_t e = iv(), got;
    int c;
    write_block(blks[0], 0);
    for (int k = 0; k < blks.size(); k++) begin
      if (k == 0) execute <= 1; else new_block <= 1;
      @(posedge clk);
      c = 0;
      fork
        begin
          repeat (4) @(posedge clk);
          new_block <= 0;
        end
        if (k + 1 < blks.size()) write_block(blks[k+1], (k + 1) % 2);
      join
      c = 4 + ((k + 1 < blks.size()) ? 12 : 0);
      do begin @(posedge clk); #1; c++; end while (!ready && c < 300);
      checks++;
      if (c != 88) begin failures++; $display("%s block %0d: ready after %0d clocks", what, k, c); end
      e = compress(e, blks[k]);
      read_digest(got);
      checks++;
      if (got != e) begin
        failures++;
        $display("%s block %0d: digest %h%h%h%h%h exp %h%h%h%h%h", what, k, got[0], got[1],
                 got[2], got[3], got[4], e[0], e[1], e[2], e[3], e[4]);
      end
    end
    execute <= 0;
    @(posedge clk);
    $display("%s: %0d block(s) %h%h%h%h%h", what, blks.size(), e[0], e[1], e[2], e[3], e[4]);
  endtask

  initial begin
    logic [7:0] m [64];
    blk_t msg [];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // clear the RAM
    for (int i = 0; i < 256; i++) begin
      cpu_addr <= 8'(i); cpu_we <= 1; cpu_wdata <= 0;
      @(posedge clk);
    end
    cpu_we <= 0;
    m[0] = "a"; m[1] = "b"; m[2] = "c";
    msg = new[1];
    msg[0] = pad1(m, 3);
    hash(msg, "abc");
    // 512-bit message: data block, then a block of padding with length 0x200
    msg = new[2];
    for (int i = 0; i < 16; i++) begin msg[0][i] = $urandom; msg[1][i] = 0; end
    msg[1][0] = 32'h80000000; msg[1][15] = 32'h200;
    hash(msg, "512-bit message");
    for (int n = 3; n <= 5; n++) begin
      msg = new[n];
      foreach (msg[i]) for (int k = 0; k < 16; k++) msg[i][k] = $urandom;
      hash(msg, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
