// tb_vga_ctrl: runs the controller at the default 640x480 timing for two
// frames against a canvas model that answers every read one clock later with
// a code pattern of its address. Checks: HS/VS periods and pulse widths,
// 640 visible pixels per line and 480 visible lines per frame, and the colour
// of every visible pixel (palette strip, cross-hair cursor, canvas code to
// colour map) against values computed in the testbench.
module tb_vga_ctrl;
  import vp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req, vga_hs, vga_vs, vga_blank_n, frame_start;
  logic [8:0] rd_x, cursor_x = 9'd200;
  logic [7:0] rd_y, cursor_y = 8'd100;
  logic cursor_on = 1;
  pen_e rd_data;
  chan_t vga_r, vga_g, vga_b;
  int checks = 0, failures = 0, pix_errs = 0;

  vga_ctrl dut (.clk, .rst_n, .req, .rd_x, .rd_y, .rd_data, .cursor_on, .cursor_x, .cursor_y,
                .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n, .frame_start);

  always #5 clk = ~clk;

  function automatic pen_e pattern(int x, int y);
    return pen_e'((x ^ (y >> 2)) & 3);
  endfunction

  // canvas model: registered read
  always @(posedge clk) rd_data <= pattern(rd_x, rd_y);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rgb_t expect_pix(int x, int y);
    if (x < 64) begin
      if (y < 120) return pen_to_rgb(PEN_RED);
      if (y < 240) return pen_to_rgb(PEN_GREEN);
      if (y < 360) return pen_to_rgb(PEN_BLUE);
      return pen_to_rgb(PEN_WHITE);
    end
    if (cursor_on && ((x >> 1) == cursor_x || (y >> 1) == cursor_y)) return '{r: 511, g: 511, b: 511};
    return pen_to_rgb(pattern(x >> 1, y >> 1));
  endfunction

  // measurement
  int clk_n = 0, last_hs_fall = -1, hs_low = 0, last_vs_fall = -1;
  int col = 0, row = 0, vis_in_line = 0, lines_vis = 0, vs_low_clks = 0;
  bit prev_hs = 1, prev_vs = 1, prev_blank = 0, seen_vs = 0;
  int hs_periods = 0, vs_periods = 0;

  always @(posedge clk) if (rst_n) begin
    clk_n++;
    if (prev_hs && !vga_hs) begin
      if (last_hs_fall >= 0) begin
        checks++; hs_periods++;
        if (clk_n - last_hs_fall != 800) begin failures++; $display("FAIL HS period %0d", clk_n - last_hs_fall); end
      end
      last_hs_fall = clk_n;
      hs_low = 0;
    end
    if (!vga_hs) hs_low++;
    if (!prev_hs && vga_hs) begin
      checks++;
      if (hs_low != 96) begin failures++; $display("FAIL HS width %0d", hs_low); end
    end
    if (prev_vs && !vga_vs) begin
      if (last_vs_fall >= 0) begin
        checks++; vs_periods++;
        if (clk_n - last_vs_fall != 800 * 525) begin failures++; $display("FAIL VS period %0d", clk_n - last_vs_fall); end
        checks++;
        if (lines_vis != 480) begin failures++; $display("FAIL %0d visible lines", lines_vis); end
      end
      last_vs_fall = clk_n;
      vs_low_clks = 0;
      seen_vs = 1;
    end
    if (!vga_vs) vs_low_clks++;
    if (!prev_vs && vga_vs) begin
      checks++;
      if (vs_low_clks != 2 * 800) begin failures++; $display("FAIL VS width %0d", vs_low_clks); end
      row = 0; lines_vis = 0;
    end
    if (vga_blank_n) begin
      if (seen_vs) begin
        automatic rgb_t e = expect_pix(col, row);
        if (vga_r != e.r || vga_g != e.g || vga_b != e.b) begin
          pix_errs++;
          if (pix_errs < 5) $display("FAIL pixel (%0d,%0d)", col, row);
        end
      end
      col++;
    end
    if (prev_blank && !vga_blank_n) begin
      checks++;
      if (col != 640) begin failures++; $display("FAIL %0d visible pixels in a line", col); end
      col = 0; row++; lines_vis++;
    end
    if (!vga_blank_n && (vga_r != 0 || vga_g != 0 || vga_b != 0)) begin
      pix_errs++;
      if (pix_errs < 5) $display("FAIL colour during blanking");
    end
    prev_hs = vga_hs; prev_vs = vga_vs; prev_blank = vga_blank_n;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (800 * 525 + 1000) @(posedge clk);
    cursor_on = 0;   // second frame without the cursor
    repeat (800 * 525 * 2) @(posedge clk);
    checks++;
    if (pix_errs != 0) begin failures++; $display("FAIL %0d pixel errors", pix_errs); end
    checks++;
    if (hs_periods < 1000 || vs_periods < 2) begin failures++; $display("FAIL too few sync periods"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
