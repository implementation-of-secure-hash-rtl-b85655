// sha1_control: Control block of the SHA-1 module.
// It walks one 512-bit block through the datapath and handles the CPU
// handshake:
//   IDLE     -> execute high: H <- initial value, first message area
//   PREFETCH -> one cycle, RAM read of word 0 in flight, A..E <- H
//   RUN      -> 80 cycles, one step per cycle (Read Data active for t<16)
//   UPDATE   -> one cycle, H <- H + A..E, digest write started
//   WRITE    -> five cycles while Write Digest stores H0..H4
//   DONE     -> ready high; a new_block rising edge (remembered if it came
//               early) starts the next block from the other message area
// Lowering execute returns to IDLE from any state. ready rises 88 clocks
// after the edge that samples execute (or new_block in DONE): 1 prefetch,
// 80 steps, 1 update, 5 writes and the write-done handshake. The state sequence is
// this design's choice; the original hardware gives the roles of the blocks and the
// execute / new_block / ready handshake.
module sha1_control (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       execute,
  input  logic       new_block,
  input  logic [6:0] t,
  input  logic       wr_done,
  output logic       init_h,
  output logic       load,
  output logic       step_en,
  output logic       update_h,
  output logic       wr_start,
  output logic       prefetch,
  output logic       running,
  output logic       blk_sel,
  output logic       ready
);

  typedef enum logic [2:0] {IDLE, PREFETCH, RUN, UPDATE, WRITE, DONE} state_t;
  state_t state, state_n;

  logic nb_q, nb_pend, nb_rise, nb_req;

  assign nb_rise = new_block && !nb_q;
  assign nb_req  = nb_pend || nb_rise;

  always_comb begin
    state_n  = state;
    init_h   = 1'b0;
    load     = 1'b0;
    step_en  = 1'b0;
    update_h = 1'b0;
    wr_start = 1'b0;
    prefetch = 1'b0;
    running  = 1'b0;
    ready    = 1'b0;
    unique case (state)
      IDLE: if (execute) begin
        init_h  = 1'b1;
        state_n = PREFETCH;
      end
      PREFETCH: begin
        prefetch = 1'b1;
        load     = 1'b1;
        state_n  = RUN;
      end
      RUN: begin
        running = 1'b1;
        step_en = 1'b1;
        if (t == 7'd79) state_n = UPDATE;
      end
      UPDATE: begin
        update_h = 1'b1;
        wr_start = 1'b1;
        state_n  = WRITE;
      end
      WRITE: if (wr_done) state_n = DONE;
      DONE: begin
        ready = 1'b1;
        if (nb_req) state_n = PREFETCH;
      end
      default: state_n = IDLE;
    endcase
    if (!execute) state_n = IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      blk_sel <= 1'b0;
      nb_q    <= 1'b0;
      nb_pend <= 1'b0;
    end else begin
      state <= state_n;
      nb_q  <= new_block;
      if (state == IDLE) begin
        blk_sel <= 1'b0;
        nb_pend <= 1'b0;
      end else if (state == DONE && nb_req) begin
        blk_sel <= ~blk_sel;
        nb_pend <= 1'b0;
      end else if (nb_rise) begin
        nb_pend <= 1'b1;
      end
    end
  end

endmodule
