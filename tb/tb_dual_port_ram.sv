// tb_dual_port_ram: random reads and writes on both ports against an
// array model. Checks the one-cycle read latency, read-first behaviour
// on a same-port write and that a word written on one port is seen on the
// other. The model's array is cleared first by writing every word.
module tb_dual_port_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0]  a_addr = 0, b_addr = 0;
  logic        a_we = 0, b_we = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [256];
  logic [31:0] exp_a, exp_b, ad, bd;
  logic [7:0]  aa, ba;
  logic        aw, bw;

  always #5 clk = ~clk;

  dual_port_ram dut (.clk, .a_addr, .a_we, .a_wdata, .a_rdata,
                     .b_addr, .b_we, .b_wdata, .b_rdata);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a_addr <= 8'(i); a_we <= 1; a_wdata <= 32'(i * 32'h01010101);
      model[i] = 32'(i * 32'h01010101);
      @(posedge clk);
    end
    a_we <= 0;
    for (int n = 0; n < 3000; n++) begin
      aa = 8'($urandom); ba = 8'($urandom);
      aw = 1'($urandom); bw = 1'($urandom);
      ad = $urandom; bd = $urandom;
      if (aw && bw && aa == ba) bw = 0;
      a_addr <= aa; a_we <= aw; a_wdata <= ad;
      b_addr <= ba; b_we <= bw; b_wdata <= bd;
      exp_a = model[aa];
      exp_b = model[ba];
      @(posedge clk);
      if (aw) model[aa] = ad;
      if (bw) model[ba] = bd;
      #1;
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; $display("port A @%h got %h exp %h", aa, a_rdata, exp_a); end
      if (b_rdata !== exp_b) begin failures++; $display("port B @%h got %h exp %h", ba, b_rdata, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
