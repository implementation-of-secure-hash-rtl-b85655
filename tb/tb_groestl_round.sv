// tb_groestl_round: runs the column-serial round on random states for P
// and Q with various round numbers and compares with a whole-matrix
// reference round. Also checks that done rises 7 clock edges after the edge that samples
// start (8 columns at edges 0..7) and
// that busy is high in between.
module tb_groestl_round;
  import groestl_pkg::*;
  import groestl_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, q = 0, busy, done;
  state_t sin, sout;
  byte_t  rnd;
  logic [511:0] exp;
  int cyc;

  always #5 clk = ~clk;

  groestl_round dut (.clk, .rst_n, .start, .state_in(sin), .round(rnd), .sel_q(q),
                     .busy, .done, .state_out(sout));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sin = '0; rnd = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      for (int w = 0; w < 16; w++) sin[w/2][(w%2)*4 +: 4] = {$urandom};
      rnd = (n < 20) ? 8'(n % 10) : 8'($urandom);
      q   = n[0];
      exp = to_vec(round_fn(from_vec(512'(sin)), int'(rnd), q));
      start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 1;
      while (!done) begin
        @(posedge clk);
        #1;
        if (!done) begin
          cyc++;
          checks++;
          if (!busy) begin failures++; $display("busy low during round"); end
        end
      end
      checks++;
      if (cyc != 7) begin
        failures++;
        $display("round latency %0d, expected 7", cyc);
      end
      checks++;
      if (512'(sout) !== exp) begin
        failures++;
        $display("round mismatch n=%0d q=%0d rnd=%0d\n got=%h\n exp=%h", n, q, rnd, sout, exp);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
