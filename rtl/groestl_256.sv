// groestl_256: complete Groestl-256 hash core (the 10-round version with
// P/Q constants in the top-left / bottom-left byte and sigma = 0..7 for
// both permutations). One groestl_round unit is shared by everything:
//   block   : h <- P(h ^ m) ^ Q(m) ^ h
//             P runs first (10 rounds), its result is kept in a register,
//             then Q runs on the message, then both are folded into h.
//   finalize: digest <- trunc256(P(h) ^ h), the last 32 bytes.
// Interface: present a padded 512-bit block on msg (byte 0 in the top
// bits) and pulse block_valid while busy is low; first = 1 starts a new
// message from the initial value iv (the 512-bit encoding of 256). After
// the last block pulse finalize; digest_valid then rises with digest and
// stays until the next block_valid or finalize. Padding is left to the
// host. Timing: each round takes 9 clocks (one to start the round unit,
// eight columns), so busy falls 2 x 10 x 9 = 180 clocks after the edge
// that samples block_valid, and digest_valid rises 10 x 9 = 90 clocks
// after the edge that samples finalize. The round count, the shared round
// unit and the P-then-Q order follow the original hardware; the handshake
// is this design's own.
module groestl_256
  import groestl_pkg::*;
#(
  parameter int unsigned ROUNDS = ROUNDS_256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         block_valid,
  input  logic         first,
  input  logic [511:0] msg,
  input  logic         finalize,
  output logic         busy,
  output logic         digest_valid,
  output logic [255:0] digest
);

  localparam state_t IV = state_t'(512'h100);

  typedef enum logic [1:0] {PH_P, PH_Q, PH_OUT} phase_t;
  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT} fsm_t;

  fsm_t   fsm;
  phase_t phase;
  state_t h, m, st, p_res;
  byte_t  rnd;
  logic   rnd_start, rnd_busy, rnd_done;
  state_t rnd_out;

  groestl_round u_round (
    .clk, .rst_n, .start(rnd_start), .state_in(st), .round(rnd),
    .sel_q(phase == PH_Q), .busy(rnd_busy), .done(rnd_done), .state_out(rnd_out)
  );

  assign rnd_start = (fsm == S_START);
  assign busy      = (fsm != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm          <= S_IDLE;
      phase        <= PH_P;
      h            <= IV;
      m            <= '0;
      st           <= '0;
      p_res        <= '0;
      rnd          <= '0;
      digest_valid <= 1'b0;
      digest       <= '0;
    end else begin
      unique case (fsm)
        S_IDLE: begin
          if (block_valid) begin
            if (first) h <= IV;
            st           <= (first ? IV : h) ^ state_t'(msg);
            m            <= state_t'(msg);
            phase        <= PH_P;
            rnd          <= '0;
            digest_valid <= 1'b0;
            fsm          <= S_START;
          end else if (finalize) begin
            st           <= h;
            phase        <= PH_OUT;
            rnd          <= '0;
            digest_valid <= 1'b0;
            fsm          <= S_START;
          end
        end
        S_START: fsm <= S_WAIT;
        S_WAIT: if (rnd_done) begin
          if (rnd != byte_t'(ROUNDS - 1)) begin
            st  <= rnd_out;
            rnd <= rnd + 8'd1;
            fsm <= S_START;
          end else begin
            rnd <= '0;
            unique case (phase)
              PH_P: begin
                p_res <= rnd_out;
                st    <= m;
                phase <= PH_Q;
                fsm   <= S_START;
              end
              PH_Q: begin
                h   <= p_res ^ rnd_out ^ h;
                fsm <= S_IDLE;
              end
              default: begin
                digest       <= 256'(rnd_out ^ h);
                digest_valid <= 1'b1;
                fsm          <= S_IDLE;
              end
            endcase
          end
        end
        default: fsm <= S_IDLE;
      endcase
    end
  end

  request_when_idle : assert property (@(posedge clk) disable iff (!rst_n)
    !((block_valid || finalize) && busy));

  round_idle_when_started : assert property (@(posedge clk) disable iff (!rst_n)
    rnd_start |-> !rnd_busy);

endmodule
