// tb_groestl_sub_bytes: checks SubBytes on columns against an S-box
// computed from its definition (GF(2^8) inverse plus affine map). Every
// byte value passes through every row position.
module tb_groestl_sub_bytes;
  import groestl_pkg::*;
  import groestl_ref_pkg::sb;
  int checks = 0, failures = 0;
  col_t cin, cout;

  groestl_sub_bytes dut (.col_in(cin), .col_out(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int r = 0; r < 8; r++) cin[r] = 8'(v + 37 * r);
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (cout[r] !== sb(cin[r])) begin
          failures++;
          $display("S-box mismatch in=%h got=%h exp=%h", cin[r], cout[r], sb(cin[r]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
