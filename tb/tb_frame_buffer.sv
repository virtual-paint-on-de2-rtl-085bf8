// tb_frame_buffer: writes random 30-bit pixels to random addresses of a small
// frame, keeps a reference copy, and reads back every address, checking the
// data, the one-clock read latency and that out-of-frame requests are not
// flagged valid.
module tb_frame_buffer;
  import vp_pkg::*;
  localparam int W = 12, H = 9;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, rd_valid;
  logic [11:0] wr_x = 0, wr_y = 0, rd_x = 0, rd_y = 0;
  rgb_t wr_rgb = '0, rd_rgb;
  rgb_t ref_mem [H][W];
  int checks = 0, failures = 0;

  frame_buffer #(.W(W), .H(H)) dut (.clk, .rst_n, .wr_en, .wr_x, .wr_y, .wr_rgb,
                                    .rd_en, .rd_x, .rd_y, .rd_rgb, .rd_valid);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill every location, then overwrite random ones
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic rgb_t p = rgb_t'({$urandom, $urandom});
        ref_mem[y][x] = p;
        wr_en <= 1; wr_x <= 12'(x); wr_y <= 12'(y); wr_rgb <= p;
        @(posedge clk);
      end
    repeat (40) begin
      automatic int x = $urandom_range(W - 1), y = $urandom_range(H - 1);
      automatic rgb_t p = rgb_t'({$urandom, $urandom});
      ref_mem[y][x] = p;
      wr_en <= 1; wr_x <= 12'(x); wr_y <= 12'(y); wr_rgb <= p;
      @(posedge clk);
    end
    wr_en <= 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        rd_en <= 1; rd_x <= 12'(x); rd_y <= 12'(y);
        @(posedge clk);
        rd_en <= 0;
        #1;
        checks++;
        if (!rd_valid || rd_rgb != ref_mem[y][x]) begin
          failures++;
          $display("FAIL (%0d,%0d) valid=%0b got %h exp %h", x, y, rd_valid, rd_rgb, ref_mem[y][x]);
        end
        @(posedge clk);
      end
    rd_en <= 1; rd_x <= 12'(W); rd_y <= 0;
    @(posedge clk); rd_en <= 0; #1;
    checks++;
    if (rd_valid) begin failures++; $display("FAIL out-of-frame read flagged valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
