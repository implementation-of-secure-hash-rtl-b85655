// groestl_add_round_constant: AddRoundConstant applied to the leftmost
// state column, the only column whose round constant is not zero.
// For permutation P (sel_q = 0) row 0 is XORed with the round number; for
// Q (sel_q = 1) row 7 is XORed with the round number XOR ff. The other
// rows pass unchanged. Purely combinational. The constants are those of
// the Groestl definition; working on a single column with a P/Q select
// follows the original hardware.
module groestl_add_round_constant
  import groestl_pkg::*;
(
  input  col_t  col_in,
  input  byte_t round,
  input  logic  sel_q,
  output col_t  col_out
);

  always_comb begin
    col_out = col_in;
    if (sel_q) col_out[7] = col_in[7] ^ round ^ 8'hff;
    else       col_out[0] = col_in[0] ^ round;
  end

endmodule
