// tb_virtual_paint_full: the same end-to-end gesture scenario as
// tb_virtual_paint_top, but with virtual_paint_top left at its default
// parameters: 1280x960 sensor, 640x480 image and VGA, 320x240 canvas, a 64
// pixel palette strip, 20 pixel jump limit, 64 pixel marker minimum, the
// 1,000,000 clock power-on delay and the 125 clock I2C divider. The camera
// model shows 16x16 image pixel markers. Checks and mechanism counters are
// those of the reduced test; one simulated run is roughly 150 million clocks.
module tb_virtual_paint_full;
  import vp_pkg::*;
  // sizes of this test
  // the design's defaults, repeated here only for the stimulus and the checks
  localparam int SENSOR_W = 1280, IMG_W = 640, IMG_H = 480, CW = 320, CH = 240;
  localparam int PAL_W = 64, MAX_JUMP = 20, MS = 16;
  localparam int HBLANK = 16, VBLANK = 4;
  localparam int STEP = 8, JUMP = 3 * MAX_JUMP + 6;
  localparam int PALC = PAL_W * CW / IMG_W;
  localparam longint WATCHDOG = 64'd400_000_000;
  localparam int CXW = $clog2(CW), CYW = $clog2(CH);

  logic clk = 0, rst_n = 1;
  logic [15:0] sw_exposure = 16'h0400;
  logic [11:0] ccd_data;
  logic ccd_fval, ccd_lval, ccd_reset_n, ccd_trigger;
  logic i2c_sclk, i2c_sda_oe, cfg_done;
  logic slave_pull = 0;
  wire  i2c_sda = !i2c_sda_oe && !slave_pull;
  chan_t vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, vga_blank_n;
  logic [CXW-1:0] led_cursor_x;
  logic [CYW-1:0] led_cursor_y;
  logic led_pen_down;

  logic yel_on = 1, red_on = 1;
  int   yel_x = 0, yel_y = 0, red_x = IMG_W - MS - 2, red_y = 2, frames;
  int   checks = 0, failures = 0;

  virtual_paint_top dut (
    .clk, .rst_n, .sw_exposure, .ccd_data, .ccd_fval, .ccd_lval, .ccd_reset_n, .ccd_trigger,
    .i2c_sclk, .i2c_sda_oe, .i2c_sda_in(i2c_sda), .cfg_done,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n,
    .led_cursor_x, .led_cursor_y, .led_pen_down
  );

  cmos_sensor_model #(.SENSOR_W(SENSOR_W), .SENSOR_H(2 * IMG_H), .HBLANK(HBLANK), .VBLANK(VBLANK), .MS(MS)) cam (
    .clk, .run(ccd_reset_n), .yel_on, .yel_x, .yel_y, .red_on, .red_x, .red_y,
    .data(ccd_data), .fval(ccd_fval), .lval(ccd_lval), .frames);

  always #5 clk = ~clk;

  // ---- I2C responder: acknowledge every byte --------------------------------
  bit p_scl = 1, p_sda = 1, xfer = 0;
  int nbit = 0;
  always @(posedge clk) begin
    if (!rst_n) xfer = 0;
    else if (p_scl && i2c_sclk && p_sda && !i2c_sda) begin xfer = 1; nbit = 0; end
    else if (p_scl && i2c_sclk && !p_sda && i2c_sda) xfer = 0;
    else if (xfer && !p_scl && i2c_sclk) nbit++;                // SCL rising
    else if (xfer && p_scl && !i2c_sclk) begin                   // SCL falling
      if (nbit == 8) slave_pull <= 1;
      else if (nbit == 9) begin slave_pull <= 0; nbit = 0; end
    end
    p_scl = i2c_sclk; p_sda = i2c_sda;
  end

  // ---- mechanism counters ------------------------------------------------------
  int n_cfg = 0, n_rst = 0, n_clear = 0, n_rounds = 0, n_cursor_off = 0, n_stroke = 0;
  int n_jump = 0, n_click = 0, n_erase = 0, n_palette_down = 0, n_frames_fb = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_main.u_paint.state == 0 && dut.u_main.u_paint.det_done) begin
      if (dut.u_main.u_paint.down_now && !dut.u_main.u_paint.in_pal &&
          dut.u_main.u_paint.last_valid && !dut.u_main.u_paint.near) n_jump++;
      if (dut.u_main.u_paint.pen_down && !dut.u_main.u_paint.down_now &&
          dut.u_main.yel_present && dut.u_main.u_paint.in_pal) n_click++;
      if (dut.u_main.u_paint.down_now && dut.u_main.u_paint.in_pal) n_palette_down++;
      if (!dut.u_main.yel_present) n_cursor_off++;
    end
    if (dut.u_main.draw_start) begin
      n_stroke++;
      if (dut.u_main.draw_eraser) n_erase++;
    end
    if (dut.u_main.scan_done) n_rounds++;
    if (dut.u_canvas.clearing && 32'(dut.u_canvas.clr_addr) == CW * CH - 1) n_clear++;
  end
  always @(posedge cfg_done) n_cfg++;
  always @(posedge ccd_reset_n) n_rst++;

  // ---- VGA monitor: pixels painted in the pen colours per frame ---------------
  int red_px = 0, green_px = 0, last_red_px = 0, last_green_px = 0, n_vga_frames = 0;
  always @(posedge clk) begin
    if (vga_blank_n && vga_r == 10'h3ff && vga_g == 0 && vga_b == 0) red_px++;
    if (vga_blank_n && vga_r == 0 && vga_g == 10'h3ff && vga_b == 0) green_px++;
    if (dut.u_vga.frame_start) begin
      last_red_px = red_px; last_green_px = green_px; red_px = 0; green_px = 0;
      n_vga_frames++;
    end
  end

  initial begin
    #(WATCHDOG * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- helpers -----------------------------------------------------------------
  function automatic int img_of(int c); return 2 * c - (MS - 1) / 2; endfunction

  task automatic place(int cx, int cy);
    yel_x = img_of(cx); yel_y = img_of(cy);
  endtask

  task automatic settle();
    int f0 = frames, r0;
    while (frames < f0 + 2) @(posedge clk);
    r0 = n_rounds;
    while (n_rounds < r0 + 8) @(posedge clk);
  endtask

  task automatic check_cursor(int cx, int cy, string what);
    checks++;
    if (!dut.u_main.cursor_on || int'(led_cursor_x) < cx - 1 || int'(led_cursor_x) > cx + 1 ||
        int'(led_cursor_y) < cy - 1 || int'(led_cursor_y) > cy + 1) begin
      failures++;
      $display("FAIL %s: cursor on=%0b at (%0d,%0d), expected (%0d,%0d)", what, dut.u_main.cursor_on,
               int'(led_cursor_x), int'(led_cursor_y), cx, cy);
    end
  endtask

  function automatic pen_e canvas_at(int x, int y);
    return pen_e'(dut.u_canvas.mem[y * CW + x]);
  endfunction

  task automatic check_colour(pen_e e, string what);
    checks++;
    if (dut.u_main.pen_color != e) begin
      failures++; $display("FAIL %s: pen colour %0d, expected %0d", what, dut.u_main.pen_color, e);
    end
  endtask

  task automatic check_canvas(int x, int y, pen_e e, string what);
    checks++;
    if (canvas_at(x, y) != e) begin
      failures++; $display("FAIL %s: canvas (%0d,%0d) holds %0d, expected %0d", what, x, y, canvas_at(x, y), e);
    end
  endtask

  // click the palette box at canvas row cy: pen up over it, fold, release
  task automatic click(int cy);
    red_on = 1; place(PALC / 2, cy); settle();
    red_on = 0; settle();
    red_on = 1; settle();
  endtask

  // ---- scenario --------------------------------------------------------------------
  initial begin
    int sx, sy, rx, ry, i;
    place(CW / 2, CH * 3 / 4);
    #1 rst_n = 0;   // power-on reset edge
    repeat (5) @(posedge clk);
    rst_n = 1;
    while (!cfg_done) @(posedge clk);
    settle();
    // 1. cursor follows the yellow marker, pen up while red is visible
    check_cursor(CW / 2, CH * 3 / 4, "cursor only");
    checks++;
    if (led_pen_down) begin failures++; $display("FAIL pen down while red visible"); end
    check_canvas(CW / 2, CH * 3 / 4, PEN_WHITE, "nothing drawn with the pen up");
    // 2. hide red: draw a red stroke to the right
    red_on = 0;
    settle();
    for (i = 1; i <= 4; i++) begin
      place(CW / 2 + i * STEP, CH * 3 / 4);
      settle();
    end
    sx = CW / 2 + 4 * STEP; sy = CH * 3 / 4;
    check_cursor(sx, sy, "stroke end");
    // the pen point is the smoothed cursor, within one pixel of the marker
    rx = int'(led_cursor_x); ry = int'(led_cursor_y);
    check_canvas(rx, ry, PEN_RED, "red stroke end");
    check_canvas(CW / 2 + 2 * STEP, ry, PEN_RED, "red stroke middle");
    // 3. sudden jump upwards: the long segment is not drawn
    place(sx, sy - JUMP);
    settle();
    check_cursor(sx, sy - JUMP, "after jump");
    check_canvas(sx, sy - JUMP / 2, PEN_WHITE, "no line across the jump");
    // 4. pick green from the palette and draw
    click(CH * 3 / 8);
    check_colour(PEN_GREEN, "green box clicked");
    place(CW / 2, CH / 4); settle();
    red_on = 0; settle();
    place(CW / 2 + STEP, CH / 4); settle();
    check_canvas(int'(led_cursor_x), int'(led_cursor_y), PEN_GREEN, "green stroke");
    // 5. pick the eraser and rub out the end of the red stroke
    click(CH * 7 / 8);
    check_colour(PEN_WHITE, "white box clicked");
    place(sx, sy); settle();
    red_on = 0; settle();
    check_canvas(rx, ry, PEN_WHITE, "erased");
    check_canvas(int'(led_cursor_x) - 1, int'(led_cursor_y) - 1, PEN_WHITE, "erased corner");
    // 6. marker lost
    yel_on = 0; settle();
    checks++;
    if (dut.u_main.cursor_on) begin failures++; $display("FAIL cursor still on"); end
    // with the cursor gone, the screen shows both strokes beside the palette
    begin
      automatic int f0 = n_vga_frames;
      while (n_vga_frames < f0 + 2) @(posedge clk);
    end
    checks++;
    if (last_green_px <= PAL_W * (IMG_H / 4) || last_red_px <= PAL_W * (IMG_H / 4)) begin
      failures++; $display("FAIL VGA shows %0d red and %0d green pixels", last_red_px, last_green_px);
    end
    // mechanisms
    $display("mechanisms: reset=%0d config=%0d clear=%0d rounds=%0d strokes=%0d jumps=%0d clicks=%0d palette_down=%0d erase=%0d cursor_off=%0d camera_frames=%0d vga_frames=%0d",
             n_rst, n_cfg, n_clear, n_rounds, n_stroke, n_jump, n_click, n_palette_down, n_erase, n_cursor_off, frames, n_vga_frames);
    checks++;
    if (n_rst == 0 || n_cfg == 0 || n_clear == 0 || n_rounds == 0 || n_stroke == 0 || n_jump == 0 ||
        n_click == 0 || n_palette_down == 0 || n_erase == 0 || n_cursor_off == 0 || frames == 0 ||
        n_vga_frames == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
