// tb_sha1_control: drives the Control block with a model of the step
// counter (cleared by load, advanced by step_en) and of Write Digest
// (done five clocks after wr_start). Checks the state sequence and cycle
// counts of a block (88 clocks from the edge that samples execute or new_block:
// 1 prefetch, 80 steps, 1 update, 5 writes, then
// ready), that new_block alternates the message area, that a new_block
// pulse raised while a block is running is remembered, that a level held
// high starts only one block, and that lowering execute aborts.
module tb_sha1_control;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, execute = 0, new_block = 0;
  logic [6:0] t = 0;
  logic wr_done = 0;
  logic init_h, load, step_en, update_h, wr_start, prefetch, running, blk_sel, ready;
  int wr_cnt = -1;
  int n_init = 0, n_load = 0, n_step = 0, n_upd = 0;

  always #5 clk = ~clk;

  sha1_control dut (.clk, .rst_n, .execute, .new_block, .t, .wr_done, .init_h, .load,
                    .step_en, .update_h, .wr_start, .prefetch, .running, .blk_sel, .ready);

  always_ff @(posedge clk) begin
    if (load) t <= 0;
    else if (step_en && t < 80) t <= t + 1;
    wr_done <= 0;
    if (wr_start) wr_cnt <= 0;
    else if (wr_cnt >= 0) begin
      if (wr_cnt == 4) begin wr_done <= 1; wr_cnt <= -1; end
      else wr_cnt <= wr_cnt + 1;
    end
    n_init <= n_init + int'(init_h);
    n_load <= n_load + int'(load);
    n_step <= n_step + int'(step_en);
    n_upd  <= n_upd + int'(update_h);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0d)", what, t); end
  endtask

  // waits for ready and returns the number of clocks it took
  task automatic wait_ready(output int c);
    c = 0;
    do begin @(posedge clk); #1; c++; end while (!ready && c < 200);
  endtask

  initial begin
    int c, s0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    chk(!ready && !running && !prefetch, "idle after reset");
    execute <= 1;
    @(posedge clk);
    #1;
    chk(n_init == 1 && prefetch && load && !blk_sel, "prefetch from area 0 after execute");
    wait_ready(c);
    chk(c == 88, $sformatf("first block ready after %0d clocks, expected 88", c));
    chk(n_step == 80 && n_upd == 1 && n_load == 1, "80 steps, one update");
    // level-held new_block: exactly one more block
    new_block <= 1;
    s0 = n_step;
    @(posedge clk);
    #1;
    chk(prefetch && blk_sel, "second block from area 1");
    wait_ready(c);
    chk(c == 88, $sformatf("second block ready after %0d clocks", c));
    repeat (20) @(posedge clk);
    #1;
    chk(ready && n_step == s0 + 80, "held new_block starts one block only");
    new_block <= 0;
    @(posedge clk);
    // new_block pulse during computation is remembered
    new_block <= 1;
    @(posedge clk);
    new_block <= 0;
    repeat (30) @(posedge clk);
    new_block <= 1;
    @(posedge clk);
    new_block <= 0;
    wait_ready(c);
    #1;
    chk(!blk_sel, "third block from area 0");
    repeat (2) @(posedge clk);
    #1;
    chk(!ready && running, "early pulse started fourth block");
    chk(blk_sel, "fourth block from area 1");
    // abort
    execute <= 0;
    @(posedge clk);
    #1;
    chk(!running && !ready && !step_en, "execute low aborts");
    repeat (3) @(posedge clk);
    execute <= 1;
    @(posedge clk);
    #1;
    chk(n_init == 2 && !blk_sel && prefetch, "restart from area 0 with initial value");
    wait_ready(c);
    chk(c == 88, "restarted block ready after 88 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
