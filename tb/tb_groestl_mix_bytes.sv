// tb_groestl_mix_bytes: checks MixBytes on random columns and on unit
// columns (which expose the matrix B column by column) against a
// reference that multiplies by the full 8x8 circulant matrix.
module tb_groestl_mix_bytes;
  import groestl_pkg::*;
  import groestl_ref_pkg::gm;
  int checks = 0, failures = 0;
  col_t cin, cout, exp;
  int bco [8] = '{2, 2, 3, 4, 5, 3, 5, 7};

  groestl_mix_bytes dut (.col_in(cin), .col_out(cout));

  task automatic check_col();
    for (int i = 0; i < 8; i++) begin
      exp[i] = 0;
      for (int k = 0; k < 8; k++) exp[i] ^= gm(8'(bco[(k - i + 8) % 8]), cin[k]);
    end
    #1;
    checks++;
    if (cout !== exp) begin
      failures++;
      $display("MixBytes mismatch in=%h got=%h exp=%h", cin, cout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // unit column e_k: output is column k of B
    for (int k = 0; k < 8; k++) begin
      cin = '0;
      cin[k] = 8'h01;
      check_col();
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (cout[i] !== 8'(bco[(k - i + 8) % 8])) begin
          failures++;
          $display("B[%0d][%0d] got=%h", i, k, cout[i]);
        end
      end
    end
    for (int n = 0; n < 500; n++) begin
      cin = {$urandom, $urandom};
      check_col();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
