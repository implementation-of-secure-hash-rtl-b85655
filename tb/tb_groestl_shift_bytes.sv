// tb_groestl_shift_bytes: checks that column j of the result holds, in
// row i, the byte of input row i that sits (j+i) mod 8 columns away, for
// random states and every column index. The expectation rotates each
// row of a row/column matrix, built independently of the RTL packing.
module tb_groestl_shift_bytes;
  import groestl_pkg::*;
  import groestl_ref_pkg::*;
  int checks = 0, failures = 0;
  state_t     sin;
  logic [2:0] j;
  col_t       cout;
  mat_t       a, rot;

  groestl_shift_bytes dut (.state_in(sin), .col_idx(j), .col_out(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int w = 0; w < 16; w++) sin[w/2][(w%2)*4 +: 4] = {$urandom};
      a = from_vec(512'(sin));
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) rot[r][c] = a[r][(c + r) % 8];
      for (int c = 0; c < 8; c++) begin
        j = 3'(c);
        #1;
        for (int r = 0; r < 8; r++) begin
          checks++;
          if (cout[r] !== rot[r][c]) begin
            failures++;
            $display("ShiftBytes mismatch col=%0d row=%0d got=%h exp=%h", c, r, cout[r], rot[r][c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
