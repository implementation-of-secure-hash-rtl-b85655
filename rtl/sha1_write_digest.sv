// sha1_write_digest: Write Digest block of the SHA-1 module. After start
// it writes H0..H4 to five consecutive RAM words beginning at DIGEST_BASE,
// one word per clock (we high for five cycles), and pulses done in the
// cycle after the last write. The digest location follows the memory map
// of the SHA-1 system.
module sha1_write_digest #(
  parameter logic [7:0] DIGEST_BASE = 8'h20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [4:0][31:0] h,
  output logic             we,
  output logic [7:0]       addr,
  output logic [31:0]      wdata,
  output logic             done
);

  logic       active;
  logic [2:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      idx    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active <= 1'b1;
        idx    <= '0;
      end else if (active) begin
        if (idx == 3'd4) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
        idx <= idx + 3'd1;
      end
    end
  end

  always_comb begin
    we    = active;
    addr  = DIGEST_BASE + {5'b0, idx};
    wdata = (idx < 3'd5) ? h[idx] : 32'h0;
  end

endmodule
