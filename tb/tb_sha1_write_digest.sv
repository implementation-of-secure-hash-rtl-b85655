// tb_sha1_write_digest: starts the digest write with random H values and
// checks the five write cycles (address 0x20 + i, data H(i)), that we is
// low before and after, and that done follows the last write by one clock.
module tb_sha1_write_digest;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, we, done;
  logic [4:0][31:0] h;
  logic [7:0] addr;
  logic [31:0] wdata;

  always #5 clk = ~clk;

  sha1_write_digest dut (.clk, .rst_n, .start, .h, .we, .addr, .wdata, .done);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 5; i++) h[i] = $urandom;
      repeat (n % 3) @(posedge clk);
      #1;
      checks++;
      if (we || done) begin failures++; $display("we/done high while idle"); end
      start <= 1;
      @(posedge clk);
      start <= 0;
      for (int i = 0; i < 5; i++) begin
        #1;
        checks++;
        if (!we || addr !== 8'(8'h20 + i) || wdata !== h[i] || done) begin
          failures++;
          $display("write %0d: we=%b addr=%h data=%h exp %h", i, we, addr, wdata, h[i]);
        end
        @(posedge clk);
      end
      #1;
      checks++;
      if (we || !done) begin failures++; $display("after writes: we=%b done=%b", we, done); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
