// tb_groestl_add_round_constant: checks AddRoundConstant on a column for
// P and Q over all 256 round numbers and random columns. Expected values
// are worked out here byte by byte.
module tb_groestl_add_round_constant;
  import groestl_pkg::*;
  int checks = 0, failures = 0;
  col_t  cin, cout, exp;
  byte_t rnd;
  logic  q;

  groestl_add_round_constant dut (.col_in(cin), .round(rnd), .sel_q(q), .col_out(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 256; r++) begin
      for (int s = 0; s < 2; s++) begin
        cin = {$urandom, $urandom};
        rnd = 8'(r);
        q   = s[0];
        exp = cin;
        if (q) exp[7] = cin[7] ^ ~rnd;
        else   exp[0] = cin[0] ^ rnd;
        #1;
        checks++;
        if (cout !== exp) begin
          failures++;
          $display("ARC mismatch r=%0d q=%0d in=%h got=%h exp=%h", r, q, cin, cout, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
