// groestl_shift_bytes: ShiftBytes as seen by a column-serial round. Row i
// of the state is rotated left by i positions (sigma = 0,1,...,7), so
// byte (i, j) of the result is byte (i, (j+i) mod 8) of the input. The
// block returns result column col_idx, selecting each row's byte from the
// matching input column. Combinational.
module groestl_shift_bytes
  import groestl_pkg::*;
(
  input  state_t     state_in,
  input  logic [2:0] col_idx,
  output col_t       col_out
);

  always_comb begin
    for (int r = 0; r < 8; r++) col_out[r] = state_in[3'(col_idx + 3'(r))][r];
  end

endmodule
