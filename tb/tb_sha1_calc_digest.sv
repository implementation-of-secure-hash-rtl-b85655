// tb_sha1_calc_digest: drives the Calculate Digest block directly. Words
// 0..15 of a block are fed on w_in while t < 16. After 80 steps and an H
// update the chaining value is compared with an independent SHA-1 model.
// Covers the "abc" vector (a9993e36...), the standard two-block vector
// and random multi-block messages, that t counts 0..80 one step per
// clock, stops at 80, and that reset restores the initial value.
module tb_sha1_calc_digest;
  import sha1_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, init_h = 0, load = 0, step_en = 0, update_h = 0;
  logic [31:0] w_in;
  logic [6:0] t;
  logic [4:0][31:0] h;
  blk_t cur;

  always #5 clk = ~clk;

  sha1_calc_digest dut (.clk, .rst_n, .init_h, .load, .step_en, .update_h, .w_in, .t, .h);

  assign w_in = (t < 16) ? cur[t[3:0]] : 32'hdeadbeef;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input dig_t e, input string what);
    checks++;
    if (h[0] !== e[0] || h[1] !== e[1] || h[2] !== e[2] || h[3] !== e[3] || h[4] !== e[4]) begin
      failures++;
      $display("%s: got %h %h %h %h %h exp %h %h %h %h %h", what, h[0], h[1], h[2], h[3], h[4],
               e[0], e[1], e[2], e[3], e[4]);
    end
  endtask

  task automatic run_block(input blk_t b);
    cur = b;
    load <= 1;
    @(posedge clk);
    load <= 0;
    step_en <= 1;
    for (int s = 0; s < 80; s++) begin
      #1;
      checks++;
      if (t !== 7'(s)) begin failures++; $display("t=%0d expected %0d", t, s); end
      @(posedge clk);
    end
    // one extra enabled cycle: t must stay at 80
    @(posedge clk);
    step_en <= 0;
    #1;
    checks++;
    if (t !== 7'd80) begin failures++; $display("t=%0d after 81 enables", t); end
    update_h <= 1;
    @(posedge clk);
    update_h <= 0;
    #1;
  endtask

  task automatic hash(input blk_t blks [], input string what);
    dig_t e = iv();
    init_h <= 1;
    @(posedge clk);
    init_h <= 0;
    foreach (blks[i]) begin
      run_block(blks[i]);
      e = compress(e, blks[i]);
      compare(e, what);
    end
  endtask

  initial begin
    blk_t abc, two [];
    logic [7:0] m [64];
    blk_t r [];
    dig_t kat;
    for (int i = 0; i < 16; i++) abc[i] = 0;
    abc[0] = 32'h61626380; abc[15] = 32'h18;
    #1 rst_n = 0;
    #1;
    compare(iv(), "reset value");
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    hash('{abc}, "abc");
    kat[0] = 32'ha9993e36; kat[1] = 32'h4706816a; kat[2] = 32'hba3e2571;
    kat[3] = 32'h7850c26c; kat[4] = 32'h9cd0d89d;
    compare(kat, "abc known answer");
    // "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq", 56 bytes
    two = new[2];
    for (int i = 0; i < 14; i++)
      for (int k = 0; k < 4; k++) m[4*i+k] = 8'("a" + i + k);
    for (int i = 0; i < 14; i++) two[0][i] = {m[4*i], m[4*i+1], m[4*i+2], m[4*i+3]};
    two[0][14] = 32'h80000000; two[0][15] = 0;
    for (int i = 0; i < 15; i++) two[1][i] = 0;
    two[1][15] = 32'h1c0;
    hash(two, "two-block");
    kat[0] = 32'h84983e44; kat[1] = 32'h1c3bd26e; kat[2] = 32'hbaae4aa1;
    kat[3] = 32'hf95129e5; kat[4] = 32'he54670f1;
    compare(kat, "two-block known answer");
    for (int n = 0; n < 4; n++) begin
      r = new[1 + n];
      foreach (r[i]) for (int k = 0; k < 16; k++) r[i][k] = $urandom;
      hash(r, "random");
    end
    rst_n <= 0;
    #1;
    compare(iv(), "reset after use");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
