// main_ctrl: the central colour detection, segmentation and painting unit.
//
// The main control repeatedly scans the camera frame buffer, one pixel per
// clock in raster order, and feeds every pixel to the colour detector. Two
// centroid units accumulate the red and the yellow marker pixels; at the end
// of the scan they divide out the marker centres. The paint controller then
// turns the two markers into a cursor, a pen-up/pen-down state and a colour
// choice, and, with the pen down, has the line drawer write the stroke into
// the canvas memory. Only when that stroke is finished does the next scan
// begin, so every scanned frame produces at most one stroke segment.
// The division into detection, centre calculation and colour selection is
// the design's; the scan-then-draw sequencing is this implementation's.
// Timing: one scan takes IMG_W*IMG_H clocks plus a few clocks of pipeline,
// followed by the dividers (about 32 clocks) and the stroke (one clock per
// line point, nine with the eraser). scan_done pulses when a whole
// scan-detect-draw round is over.
module main_ctrl
  import vp_pkg::*;
#(
  parameter int unsigned IMG_W      = 640,
  parameter int unsigned IMG_H      = 480,
  parameter int unsigned IXW        = 12,
  parameter int unsigned IYW        = 12,
  parameter int unsigned CW         = 320,
  parameter int unsigned CH         = 240,
  parameter int unsigned SHIFT      = 1,
  parameter int unsigned PAL_W      = 32,
  parameter int unsigned MAX_JUMP   = 20,
  parameter int unsigned MIN_PIXELS = 64,
  parameter int unsigned CXW        = $clog2(CW),
  parameter int unsigned CYW        = $clog2(CH),
  parameter int unsigned CNT_W      = $clog2(IMG_W * IMG_H + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // frame buffer read port
  output logic           fb_rd_en,
  output logic [IXW-1:0] fb_rd_x,
  output logic [IYW-1:0] fb_rd_y,
  input  rgb_t           fb_rd_rgb,
  input  logic           fb_rd_valid,
  // canvas write port
  output logic           cv_wr_en,
  output logic [CXW-1:0] cv_wr_x,
  output logic [CYW-1:0] cv_wr_y,
  output pen_e           cv_wr_data,
  // state for display and debug
  output logic           cursor_on,
  output logic [CXW-1:0] cursor_x,
  output logic [CYW-1:0] cursor_y,
  output pen_e           pen_color,
  output logic           pen_down,
  output logic [CNT_W-1:0] red_count,
  output logic [CNT_W-1:0] yel_count,
  output logic           scan_done
);

  typedef enum logic [1:0] {S_SCAN, S_DRAIN, S_WAIT} state_e;
  state_e state;

  logic [IXW-1:0] sx;
  logic [IYW-1:0] sy;
  logic           first, last;
  logic [IXW-1:0] x1;
  logic [IYW-1:0] y1;
  logic           last1, last2, frame_end, frame_start;

  logic           det_valid, is_red, is_yel;
  logic [IXW-1:0] det_x;
  logic [IYW-1:0] det_y;

  logic           red_done, yel_done, red_present, yel_present;
  logic [IXW-1:0] red_cx, yel_cx;
  logic [IYW-1:0] red_cy, yel_cy;

  logic           draw_start, draw_eraser, draw_done, draw_busy, frame_done;
  logic [CXW-1:0] dx0, dx1;
  logic [CYW-1:0] dy0, dy1;
  pen_e           draw_color;

  assign first = (sx == '0) && (sy == '0);
  assign last  = (sx == IXW'(IMG_W - 1)) && (sy == IYW'(IMG_H - 1));

  // raster scanner over the frame buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_SCAN;
      sx          <= '0;
      sy          <= '0;
      x1          <= '0;
      y1          <= '0;
      last1       <= 1'b0;
      last2       <= 1'b0;
      frame_end   <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      x1          <= sx;
      y1          <= sy;
      last1       <= (state == S_SCAN) && last;
      last2       <= last1;
      frame_end   <= last2;
      frame_start <= (state == S_SCAN) && first;
      unique case (state)
        S_SCAN: begin
          if (sx == IXW'(IMG_W - 1)) begin
            sx <= '0;
            sy <= (sy == IYW'(IMG_H - 1)) ? '0 : sy + 1'b1;
          end else begin
            sx <= sx + 1'b1;
          end
          if (last) state <= S_DRAIN;
        end
        S_DRAIN: if (frame_end) state <= S_WAIT;
        default: if (frame_done) state <= S_SCAN;
      endcase
    end
  end

  assign fb_rd_en  = (state == S_SCAN);
  assign fb_rd_x   = sx;
  assign fb_rd_y   = sy;
  assign scan_done = frame_done;

  color_detect #(.XW(IXW), .YW(IYW)) u_detect (
    .clk, .rst_n,
    .in_rgb(fb_rd_rgb), .in_valid(fb_rd_valid), .in_x(x1), .in_y(y1),
    .out_valid(det_valid), .is_red, .is_yellow(is_yel), .out_x(det_x), .out_y(det_y)
  );

  centroid #(.XW(IXW), .YW(IYW), .MAX_PIXELS(IMG_W * IMG_H), .MIN_PIXELS(MIN_PIXELS)) u_red (
    .clk, .rst_n, .frame_start, .hit(det_valid && is_red), .x(det_x), .y(det_y),
    .frame_end, .done(red_done), .present(red_present), .cx(red_cx), .cy(red_cy),
    .count(red_count)
  );

  centroid #(.XW(IXW), .YW(IYW), .MAX_PIXELS(IMG_W * IMG_H), .MIN_PIXELS(MIN_PIXELS)) u_yellow (
    .clk, .rst_n, .frame_start, .hit(det_valid && is_yel), .x(det_x), .y(det_y),
    .frame_end, .done(yel_done), .present(yel_present), .cx(yel_cx), .cy(yel_cy),
    .count(yel_count)
  );

  paint_ctrl #(
    .IXW(IXW), .IYW(IYW), .CW(CW), .CH(CH), .SHIFT(SHIFT), .PAL_W(PAL_W),
    .MAX_JUMP(MAX_JUMP), .XW(CXW), .YW(CYW)
  ) u_paint (
    .clk, .rst_n,
    .det_done(yel_done), .yel_present, .yel_x(yel_cx), .yel_y(yel_cy), .red_present,
    .cursor_on, .cursor_x, .cursor_y, .pen_color, .pen_down,
    .draw_start, .draw_x0(dx0), .draw_y0(dy0), .draw_x1(dx1), .draw_y1(dy1),
    .draw_color, .draw_eraser, .draw_done, .frame_done
  );

  line_drawer #(.W(CW), .H(CH), .XW(CXW), .YW(CYW)) u_line (
    .clk, .rst_n, .start(draw_start),
    .x0(dx0), .y0(dy0), .x1(dx1), .y1(dy1), .color(draw_color), .eraser(draw_eraser),
    .busy(draw_busy), .done(draw_done),
    .wr_en(cv_wr_en), .wr_x(cv_wr_x), .wr_y(cv_wr_y), .wr_data(cv_wr_data)
  );

  a_done_together: assert property (@(posedge clk) disable iff (!rst_n) red_done == yel_done);
  a_start_idle:    assert property (@(posedge clk) disable iff (!rst_n) draw_start |-> !draw_busy);

endmodule
