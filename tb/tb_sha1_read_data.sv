// tb_sha1_read_data: exhaustive check of the Read Data address generator
// over both message areas, prefetch and every step number: word 0 during
// prefetch, word t+1 during steps 0..14, reads disabled from step 15 on.
module tb_sha1_read_data;
  int checks = 0, failures = 0;
  logic prefetch, running, blk_sel, rd_en;
  logic [6:0] t;
  logic [7:0] rd_addr;

  sha1_read_data dut (.prefetch, .running, .blk_sel, .t, .rd_en, .rd_addr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) begin
      blk_sel = b[0];
      prefetch = 1; running = 0; t = 0;
      #1;
      checks++;
      if (!rd_en || rd_addr !== 8'(16 * b)) begin
        failures++; $display("prefetch blk=%0d en=%b addr=%h", b, rd_en, rd_addr);
      end
      prefetch = 0; running = 1;
      for (int s = 0; s < 80; s++) begin
        t = 7'(s);
        #1;
        checks++;
        if (s < 15) begin
          if (!rd_en || rd_addr !== 8'(16 * b + s + 1)) begin
            failures++; $display("t=%0d blk=%0d en=%b addr=%h", s, b, rd_en, rd_addr);
          end
        end else if (rd_en) begin
          failures++; $display("read enabled at t=%0d", s);
        end
      end
      running = 0;
      #1;
      checks++;
      if (rd_en) begin failures++; $display("read enabled while idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
