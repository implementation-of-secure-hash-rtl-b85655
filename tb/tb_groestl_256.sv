// tb_groestl_256: hashes messages of 0, 3, 55, 100 and 200 bytes (one to
// four padded blocks) and compares each digest with the whole-matrix
// reference model. Checks the clocks from block_valid to busy low and from
// finalize to digest_valid, and that a new message (first = 1) restarts
// from the initial value.
module tb_groestl_256;
  import groestl_ref_pkg::*;
  localparam int R = 10;
  localparam int BLOCK_CYCLES = 2 * R * 9;
  localparam int FINAL_CYCLES = R * 9;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, block_valid = 0, first = 0, finalize = 0;
  logic busy, digest_valid;
  logic [511:0] msg = '0;
  logic [255:0] digest;

  always #5 clk = ~clk;

  groestl_256 dut (.clk, .rst_n, .block_valid, .first, .msg, .finalize, .busy,
                   .digest_valid, .digest);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_idle(input int expect_cycles, input string what);
    int c = 0;
    do begin
      @(posedge clk);
      #1;
      c++;
    end while (busy);
    checks++;
    if (c != expect_cycles) begin
      failures++;
      $display("%s took %0d clocks, expected %0d", what, c, expect_cycles);
    end
  endtask

  task automatic hash(input logic [7:0] m [256], input int len);
    int n = nblocks(len);
    logic [511:0] h = 512'h100;
    logic [255:0] exp;
    for (int b = 0; b < n; b++) begin
      logic [511:0] blk = pad_block(m, len, b);
      h = compress(h, blk, R);
      msg <= blk;
      first <= (b == 0);
      block_valid <= 1;
      @(posedge clk);
      block_valid <= 0;
      first <= 0;
      wait_idle(BLOCK_CYCLES, "block");
    end
    exp = out_tf(h, R);
    finalize <= 1;
    @(posedge clk);
    finalize <= 0;
    wait_idle(FINAL_CYCLES, "output transformation");
    checks++;
    if (!digest_valid || digest !== exp) begin
      failures++;
      $display("len=%0d digest mismatch\n got=%h\n exp=%h", len, digest, exp);
    end else $display("len=%0d blocks=%0d digest=%h", len, n, digest);
  endtask

  initial begin
    logic [7:0] m [256];
    int lens [5] = '{0, 3, 55, 100, 200};
    for (int i = 0; i < 256; i++) m[i] = 8'($urandom);
    m[0] = "a"; m[1] = "b"; m[2] = "c";
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (lens[i]) hash(m, lens[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
