// groestl_sub_bytes: SubBytes for one state column. Each of the eight
// bytes is replaced by its image under the Rijndael S-box (eight S-box
// lookups in parallel, combinational). A round column-serial datapath uses
// one instance per clock for one column.
module groestl_sub_bytes
  import groestl_pkg::*;
(
  input  col_t col_in,
  output col_t col_out
);

  always_comb begin
    for (int r = 0; r < 8; r++) col_out[r] = sbox(col_in[r]);
  end

endmodule
