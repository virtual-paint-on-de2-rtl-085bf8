// tb_paint_ctrl: plays a sequence of per-frame marker reports through the
// paint controller, with a stand-in line drawer that answers draw_start with
// draw_done a few clocks later. A reference model in the testbench tracks
// smoothing, pen state, stroke continuation, the jump limit and palette
// clicks; every frame the cursor, the pen colour and the issued stroke are
// compared with it. Each behaviour (new stroke, continued stroke, rejected
// jump, palette click, eraser stroke, cursor off) is counted and must occur.
module tb_paint_ctrl;
  import vp_pkg::*;
  localparam int CW = 320, CH = 240, PAL = 32, JUMP = 20;
  logic clk = 0, rst_n = 0;
  logic det_done = 0, yel_present = 0, red_present = 0;
  logic [11:0] yel_x = 0, yel_y = 0;
  logic cursor_on, pen_down, draw_start, draw_eraser, frame_done;
  logic draw_done = 0;
  logic [8:0] cursor_x, draw_x0, draw_x1;
  logic [7:0] cursor_y, draw_y0, draw_y1;
  pen_e pen_color, draw_color;
  int checks = 0, failures = 0;
  int n_new = 0, n_cont = 0, n_jump = 0, n_click = 0, n_erase = 0, n_off = 0;

  // reference state
  bit   m_sm_valid = 0, m_last_valid = 0, m_down = 0;
  int   m_sx, m_sy, m_lx, m_ly;
  pen_e m_color = PEN_RED;

  paint_ctrl dut (.clk, .rst_n, .det_done, .yel_present, .yel_x, .yel_y, .red_present,
                  .cursor_on, .cursor_x, .cursor_y, .pen_color, .pen_down,
                  .draw_start, .draw_x0, .draw_y0, .draw_x1, .draw_y1, .draw_color,
                  .draw_eraser, .draw_done, .frame_done);

  always #5 clk = ~clk;

  // stand-in line drawer
  always @(posedge clk) if (draw_start) fork begin
    repeat (4) @(posedge clk);
    draw_done <= 1; @(posedge clk); draw_done <= 0;
  end join_none

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  // one frame report: yellow at image (ix, iy) if yp, red visible if rp
  task automatic frame(bit yp, int ix, int iy, bit rp);
    int nx, ny, px, py;
    bit down, exp_draw, got_draw;
    int ex0, ey0, ex1, ey1;
    pen_e ecol;
    // reference model
    nx = ix >> 1; ny = iy >> 1;
    px = m_sm_valid ? (m_sx + nx) >> 1 : nx;
    py = m_sm_valid ? (m_sy + ny) >> 1 : ny;
    down = yp && !rp;
    exp_draw = 0;
    if (m_down && !down && yp && px < PAL) begin
      m_color = (py < CH/4) ? PEN_RED : (py < CH/2) ? PEN_GREEN : (py < 3*CH/4) ? PEN_BLUE : PEN_WHITE;
      n_click++;
    end
    ecol = m_color;
    if (down && px >= PAL) begin
      if (!m_last_valid || (iabs(px - m_lx) <= JUMP && iabs(py - m_ly) <= JUMP)) begin
        exp_draw = 1;
        ex0 = m_last_valid ? m_lx : px; ey0 = m_last_valid ? m_ly : py;
        ex1 = px; ey1 = py;
        if (m_last_valid) n_cont++; else n_new++;
        if (m_color == PEN_WHITE) n_erase++;
      end else n_jump++;
      m_lx = px; m_ly = py; m_last_valid = 1;
    end else m_last_valid = 0;
    if (yp) begin m_sx = px; m_sy = py; end
    m_sm_valid = yp;
    m_down = down;
    if (!yp) n_off++;
    // drive the report
    yel_present <= yp; red_present <= rp; yel_x <= 12'(ix); yel_y <= 12'(iy);
    det_done <= 1;
    @(posedge clk);
    det_done <= 0;
    got_draw = 0;
    while (!frame_done) begin
      @(posedge clk);
      if (draw_start) begin
        got_draw = 1;
        checks++;
        if (!exp_draw || draw_x0 != ex0 || draw_y0 != ey0 || draw_x1 != ex1 || draw_y1 != ey1 ||
            draw_color != ecol || draw_eraser != (ecol == PEN_WHITE)) begin
          failures++;
          $display("FAIL stroke (%0d,%0d)-(%0d,%0d) c=%0d exp (%0d,%0d)-(%0d,%0d) c=%0d draw=%0b",
                   draw_x0, draw_y0, draw_x1, draw_y1, draw_color, ex0, ey0, ex1, ey1, ecol, exp_draw);
        end
      end
    end
    #1;
    checks++;
    if (got_draw != exp_draw) begin failures++; $display("FAIL draw issued=%0b expected=%0b", got_draw, exp_draw); end
    checks++;
    if (cursor_on != yp || (yp && (cursor_x != px || cursor_y != py)) || pen_color != m_color || pen_down != down) begin
      failures++;
      $display("FAIL cursor on=%0b (%0d,%0d) colour %0d down %0b, exp (%0d,%0d) colour %0d", cursor_on,
               cursor_x, cursor_y, pen_color, pen_down, px, py, m_color, down);
    end
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    frame(1, 300, 200, 1);   // cursor only, pen up
    frame(1, 310, 210, 0);   // pen down: new stroke (single point)
    frame(1, 330, 220, 0);   // continue
    frame(1, 350, 240, 0);   // continue
    frame(1, 600, 460, 0);   // jump too long: rejected
    frame(1, 610, 470, 0);   // continue from the new point
    frame(1, 610, 470, 1);   // pen up
    // go to the palette, green box (canvas y 60..119 -> image 120..239)
    frame(1, 20, 180, 1);
    frame(1, 20, 180, 1);
    frame(1, 20, 180, 0);    // fold: pen down over palette (no stroke)
    frame(1, 20, 180, 1);    // release: click selects
    frame(1, 400, 100, 1);
    frame(1, 400, 100, 0);   // green stroke
    frame(1, 404, 104, 0);
    frame(0, 0, 0, 0);       // marker lost: cursor off
    // pick white (eraser): canvas y >= 180 -> image >= 360
    frame(1, 10, 420, 1);
    frame(1, 10, 420, 1);
    frame(1, 10, 420, 0);
    frame(1, 10, 420, 1);
    frame(1, 200, 200, 1);
    frame(1, 200, 200, 0);   // eraser stroke
    frame(1, 210, 206, 0);
    for (int i = 0; i < 200; i++)
      frame($urandom_range(9) != 0, $urandom_range(639), $urandom_range(479), $urandom_range(2) == 0);
    checks++;
    if (n_new == 0 || n_cont == 0 || n_jump == 0 || n_click == 0 || n_erase == 0 || n_off == 0) begin
      failures++;
      $display("FAIL coverage new=%0d cont=%0d jump=%0d click=%0d erase=%0d off=%0d",
               n_new, n_cont, n_jump, n_click, n_erase, n_off);
    end
    $display("coverage new=%0d cont=%0d jump=%0d click=%0d erase=%0d off=%0d",
             n_new, n_cont, n_jump, n_click, n_erase, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
