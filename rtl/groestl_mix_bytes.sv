// groestl_mix_bytes: MixBytes for one column. The column, taken as a
// vector over GF(2^8), is left-multiplied by the circulant matrix
// B = circ(02,02,03,04,05,03,05,07): output row i is the sum over k of
// b[(k - i) mod 8] * a[k]. One coefficient set is used for every row and
// the input column is rotated instead, as in the original hardware.
// Combinational.
module groestl_mix_bytes
  import groestl_pkg::*;
(
  input  col_t col_in,
  output col_t col_out
);

  localparam logic [2:0] COEF [8] = '{3'd2, 3'd2, 3'd3, 3'd4, 3'd5, 3'd3, 3'd5, 3'd7};

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      byte_t acc;
      acc = 8'h00;
      for (int k = 0; k < 8; k++) acc = acc ^ gmul(col_in[(k + i) % 8], COEF[k]);
      col_out[i] = acc;
    end
  end

endmodule
