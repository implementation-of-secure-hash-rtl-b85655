// sha1_calc_digest: the SHA-1 compression datapath, one step per clock.
// Registers A..E hold the working state, H0..H4 the chaining value and t
// the step counter. A 16-word shift register holds the last 16 schedule
// words: for t < 16 the word comes from w_in (read from the RAM), after
// that it is W(t) = rotl1(W(t-3) ^ W(t-8) ^ W(t-14) ^ W(t-16)).
// Controls, all sampled at the rising clock edge:
//   init_h   : H0..H4 <- initial value (start of a new message)
//   load     : A..E <- H0..H4, t <- 0 (start of a 512-bit block)
//   step_en  : perform step t with K(t), F(t) and W(t); t <- t+1
//   update_h : H(i) <- H(i) + working register (after step 79)
// rst_n low returns the counter and all registers to their defaults.
// The step and schedule equations follow FIPS 180-1; the shift-register
// schedule is this design's choice.
module sha1_calc_digest
  import sha1_pkg::*;
#(
  parameter int unsigned ROUNDS = 80
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init_h,
  input  logic              load,
  input  logic              step_en,
  input  logic              update_h,
  input  word_t             w_in,
  output logic [6:0]        t,
  output logic [4:0][31:0]  h
);

  word_t a, b, c, d, e;
  word_t w [16];
  word_t w_t, tmp;

  always_comb begin
    if (t < 7'd16) w_t = w_in;
    else           w_t = rotl(w[13] ^ w[8] ^ w[2] ^ w[0], 1);
    tmp = rotl(a, 5) + f_func(t, b, c, d) + w_t + k_const(t) + e;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0;
      {a, b, c, d, e} <= {IV[0], IV[1], IV[2], IV[3], IV[4]};
      for (int i = 0; i < 5; i++) h[i] <= IV[i];
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else begin
      if (init_h) begin
        for (int i = 0; i < 5; i++) h[i] <= IV[i];
      end else if (update_h) begin
        h[0] <= h[0] + a;
        h[1] <= h[1] + b;
        h[2] <= h[2] + c;
        h[3] <= h[3] + d;
        h[4] <= h[4] + e;
      end
      if (load) begin
        t <= '0;
        {a, b, c, d, e} <= {h[0], h[1], h[2], h[3], h[4]};
      end else if (step_en && t < 7'(ROUNDS)) begin
        t <= t + 7'd1;
        a <= tmp;
        b <= a;
        c <= rotl(b, 30);
        d <= c;
        e <= d;
        for (int i = 0; i < 15; i++) w[i] <= w[i+1];
        w[15] <= w_t;
      end
    end
  end

endmodule
