// groestl_round: one Groestl round
//   R = MixBytes o ShiftBytes o SubBytes o AddRoundConstant
// computed one result column per clock. The caller holds state_in, the
// round number and the P/Q select stable from start until done.
// AddRoundConstant works on input column 0; ShiftBytes picks the bytes of
// result column j from the (constant-added) input; eight S-boxes and one
// MixBytes column unit then finish the column, which is shifted into a
// 512-bit collection register. Timing: the clock edge that samples start
// stores column 0, the next seven edges columns 1..7; done is high for the
// one cycle after the eighth edge, with state_out valid; state_out holds
// until the next start. Sharing one column of S-boxes and MixBytes over
// eight clocks is this design's area-saving choice.
module groestl_round
  import groestl_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t state_in,
  input  byte_t  round,
  input  logic   sel_q,
  output logic   busy,
  output logic   done,
  output state_t state_out
);

  logic [2:0] col_idx;
  col_t       state_arc_c0, col_shift, col_sub, col_mix;
  state_t     state_for_shift;

  groestl_add_round_constant u_arc (
    .col_in(state_in[0]), .round, .sel_q, .col_out(state_arc_c0)
  );
  always_comb begin
    state_for_shift    = state_in;
    state_for_shift[0] = state_arc_c0;
  end

  groestl_shift_bytes u_shift (.state_in(state_for_shift), .col_idx, .col_out(col_shift));
  groestl_sub_bytes   u_sub   (.col_in(col_shift), .col_out(col_sub));
  groestl_mix_bytes   u_mix   (.col_in(col_sub), .col_out(col_mix));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      col_idx   <= '0;
      state_out <= '0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        state_out <= {state_out[1:7], col_mix};
        col_idx   <= col_idx + 3'd1;
        if (col_idx == 3'd7) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          busy <= 1'b1;
        end
      end
    end
  end

  start_when_idle : assert property (@(posedge clk) disable iff (!rst_n) !(start && busy));

endmodule
