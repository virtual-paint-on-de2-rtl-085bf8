// tb_main_ctrl: the main control on a reduced 64x48 image (32x24 canvas)
// with a frame-buffer model in the testbench. Scenes with a yellow and
// optionally a red square marker on a white background are placed in the
// model; after each scan-detect-draw round the testbench checks the cursor
// (centroid of the yellow square, halved, averaged with the previous
// position), the pen state, the number and colour of canvas writes of the
// stroke, and that one scan reads each of the 64x48 pixels exactly once.
module tb_main_ctrl;
  import vp_pkg::*;
  localparam int IW = 64, IH = 48, CW = 32, CH = 24;
  logic clk = 0, rst_n = 0;
  logic fb_rd_en, fb_rd_valid = 0;
  logic [11:0] fb_rd_x, fb_rd_y;
  rgb_t fb_rd_rgb = '0;
  logic cv_wr_en, cursor_on, pen_down, scan_done;
  logic [4:0] cv_wr_x, cursor_x;
  logic [4:0] cv_wr_y, cursor_y;
  pen_e cv_wr_data, pen_color;
  logic [11:0] red_count, yel_count;
  int checks = 0, failures = 0;

  rgb_t img [IH][IW];
  int   reads = 0, writes = 0, bad_colour = 0, last_reads, last_writes, last_bad;

  main_ctrl #(.IMG_W(IW), .IMG_H(IH), .CW(CW), .CH(CH), .SHIFT(1), .PAL_W(4),
              .MAX_JUMP(20), .MIN_PIXELS(4)) dut (
    .clk, .rst_n, .fb_rd_en, .fb_rd_x, .fb_rd_y, .fb_rd_rgb, .fb_rd_valid,
    .cv_wr_en, .cv_wr_x, .cv_wr_y, .cv_wr_data,
    .cursor_on, .cursor_x, .cursor_y, .pen_color, .pen_down,
    .red_count, .yel_count, .scan_done);

  always #5 clk = ~clk;

  // frame buffer model: one-clock read
  always @(posedge clk) begin
    fb_rd_valid <= fb_rd_en;
    if (fb_rd_en) begin
      fb_rd_rgb <= img[fb_rd_y][fb_rd_x];
      if (rst_n) reads++;
    end
    if (cv_wr_en) begin
      writes++;
      if (cv_wr_data != PEN_RED) bad_colour++;
    end
    if (scan_done) begin
      last_reads = reads; last_writes = writes; last_bad = bad_colour;
      reads = 0; writes = 0; bad_colour = 0;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic scene(int yx, int yy, bit red);
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++) img[y][x] = '{r: 1000, g: 1000, b: 990};
    for (int y = yy; y < yy + 4; y++) for (int x = yx; x < yx + 4; x++) img[y][x] = '{r: 950, g: 900, b: 50};
    if (red) for (int y = 2; y < 6; y++) for (int x = 50; x < 55; x++) img[y][x] = '{r: 1000, g: 80, b: 60};
  endtask

  bit m_sm = 0, m_last = 0;
  int m_sx, m_sy, m_lx, m_ly;

  // The scene (yx, yy, red) is in the model; wait for the round that
  // scanned it, check it, then put the next scene in place before the next
  // scan starts reading.
  task automatic round(int yx, int yy, bit red, int nyx, int nyy, bit nred);
    int nx, ny, px, py, exp_writes;
    bit down;
    @(posedge clk);
    while (!scan_done) @(posedge clk);
    scene(nyx, nyy, nred);
    @(posedge clk);
    #1;
    nx = (yx + (yx + 3)) / 2 >> 1;  ny = (yy + (yy + 3)) / 2 >> 1;
    px = m_sm ? (m_sx + nx) >> 1 : nx;
    py = m_sm ? (m_sy + ny) >> 1 : ny;
    down = !red;
    exp_writes = 0;
    if (down && px >= 4) begin
      if (!m_last) exp_writes = 1;
      else if (iabs(px - m_lx) <= 20 && iabs(py - m_ly) <= 20)
        exp_writes = (iabs(px - m_lx) > iabs(py - m_ly) ? iabs(px - m_lx) : iabs(py - m_ly)) + 1;
      m_lx = px; m_ly = py; m_last = 1;
    end else m_last = 0;
    m_sx = px; m_sy = py; m_sm = 1;
    checks++;
    if (!cursor_on || cursor_x != px || cursor_y != py || pen_down != down) begin
      failures++;
      $display("FAIL cursor on=%0b (%0d,%0d) down=%0b, exp (%0d,%0d) down=%0b", cursor_on, cursor_x, cursor_y,
               pen_down, px, py, down);
    end
    checks++;
    if (yel_count != 16 || red_count != (red ? 20 : 0)) begin
      failures++; $display("FAIL marker pixel counts yellow=%0d red=%0d", yel_count, red_count);
    end
    checks++;
    if (last_writes != exp_writes || last_bad != 0) begin
      failures++; $display("FAIL %0d canvas writes, expected %0d", last_writes, exp_writes);
    end
    checks++;
    if (last_reads != IW * IH) begin failures++; $display("FAIL scan read %0d pixels", last_reads); end
  endtask

  initial begin
    int sc [10][3] = '{'{40, 20, 1},   // cursor only
                       '{40, 20, 1},
                       '{40, 20, 0},   // pen down: a point
                       '{50, 30, 0},   // stroke continues
                       '{20, 10, 0},
                       '{20, 40, 1},   // pen up
                       '{30, 12, 0},   // new stroke
                       '{34, 16, 0},
                       '{36, 18, 0},
                       '{36, 18, 1}};
    scene(sc[0][0], sc[0][1], sc[0][2] != 0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 9; i++)
      round(sc[i][0], sc[i][1], sc[i][2] != 0, sc[i+1][0], sc[i+1][1], sc[i+1][2] != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
