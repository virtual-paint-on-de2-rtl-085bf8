// tb_mirror_col: sends lines of random pixels, some with idle gaps, and
// checks that each line comes out reversed, with ascending output columns,
// the same row number, and that the line arrives one line late.
module tb_mirror_col;
  import vp_pkg::*;
  localparam int W = 10, LINES = 6;
  logic clk = 0, rst_n = 0;
  rgb_t in_rgb = '0, out_rgb;
  logic in_valid = 0, out_valid;
  logic [11:0] in_x = 0, in_y = 0, out_x, out_y;
  int checks = 0, failures = 0, nout = 0;
  rgb_t line_px [LINES][W];
  int cur_col = 0;
  int cur_row = 0;

  mirror_col #(.W(W)) dut (.clk, .rst_n, .in_rgb, .in_valid, .in_x, .in_y,
                           .out_rgb, .out_valid, .out_x, .out_y);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    nout++;
    if (out_x != cur_col || out_y != cur_row || out_rgb != line_px[cur_row][W-1-cur_col]) begin
      failures++;
      $display("FAIL row %0d col %0d: got x=%0d y=%0d", cur_row, cur_col, out_x, out_y);
    end
    if (cur_col == W - 1) begin cur_col = 0; cur_row++; end
    else cur_col++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < LINES; y++) begin
      for (int x = 0; x < W; x++) line_px[y][x] = rgb_t'({$urandom, $urandom});
      for (int x = 0; x < W; x++) begin
        in_valid <= 1; in_x <= 12'(x); in_y <= 12'(y); in_rgb <= line_px[y][x];
        @(posedge clk);
        if (y % 2 == 1 && x == 3) begin in_valid <= 0; repeat (3) @(posedge clk); end
      end
      in_valid <= 0;
      // a row must not appear before its own last pixel went in
      checks++;
      if (cur_row > y) begin failures++; $display("FAIL row %0d early", y); end
      repeat (2) @(posedge clk);
    end
    repeat (W + 5) @(posedge clk);
    checks++;
    if (nout != W * LINES) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
