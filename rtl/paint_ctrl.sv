// paint_ctrl: gesture interpretation -- cursor, pen up/down, palette
// selection and stroke commands (the design's colour select unit).
//
// Once per scanned frame the centroid units report whether the yellow and the
// red marker were seen and where. The yellow marker is the cursor. The red
// marker is the pen switch: while red is visible the pen is up (the cursor
// only moves); when the red finger is folded away the pen is down. A pen
// down then up (a "click") with the cursor over the palette strip at the
// left edge selects that strip's colour; the strip is split into four equal
// boxes, top to bottom red, green, blue, white (white erases). With the pen
// down over the drawing area, a line is drawn from the last point of the
// stroke to the new one. A jump longer than MAX_JUMP canvas pixels in x or y
// is treated as detection noise: nothing is drawn for that frame and the
// stroke restarts from the new point. The cursor position is smoothed by
// averaging the new centre with the previous smoothed one.
// From the design: yellow cursor, red pen-up, click-to-select on a left-edge
// palette, four colours with white as eraser, 20-pixel jump limit, smoothing
// of successive centres. Our own choices: the two-frame mean as the
// smoothing, the click completing on release, the box layout of the strip,
// and the coordinate scaling (image coordinates >> SHIFT).
// Timing: all decisions are taken on the clock after det_done; when a line is
// needed draw_start pulses then, and frame_done pulses when the line drawer
// reports done (or on that clock if nothing is drawn).
module paint_ctrl
  import vp_pkg::*;
#(
  parameter int unsigned IXW      = 12,   // image coordinate widths
  parameter int unsigned IYW      = 12,
  parameter int unsigned CW       = 320,  // canvas size
  parameter int unsigned CH       = 240,
  parameter int unsigned SHIFT    = 1,    // image -> canvas scale
  parameter int unsigned PAL_W    = 32,   // palette strip width (canvas px)
  parameter int unsigned MAX_JUMP = 20,
  parameter int unsigned XW       = $clog2(CW),
  parameter int unsigned YW       = $clog2(CH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // per-frame detection result
  input  logic           det_done,
  input  logic           yel_present,
  input  logic [IXW-1:0] yel_x,
  input  logic [IYW-1:0] yel_y,
  input  logic           red_present,
  // cursor and state for display
  output logic           cursor_on,
  output logic [XW-1:0]  cursor_x,
  output logic [YW-1:0]  cursor_y,
  output pen_e           pen_color,
  output logic           pen_down,
  // line drawer command
  output logic           draw_start,
  output logic [XW-1:0]  draw_x0,
  output logic [YW-1:0]  draw_y0,
  output logic [XW-1:0]  draw_x1,
  output logic [YW-1:0]  draw_y1,
  output pen_e           draw_color,
  output logic           draw_eraser,
  input  logic           draw_done,
  // handshake back to the frame scanner
  output logic           frame_done
);

  localparam int unsigned BOX_H = CH / 4;

  typedef enum logic [1:0] {S_IDLE, S_DRAW} state_e;
  state_e state;

  logic           smooth_valid;
  logic [XW-1:0]  sm_x, last_x;
  logic [YW-1:0]  sm_y, last_y;
  logic           last_valid;

  // new position on the canvas, smoothed against the previous one
  logic [XW-1:0]  nx, px;
  logic [YW-1:0]  ny, py;
  logic           down_now, in_pal, near;
  logic [XW:0]    adx;
  logic [YW:0]    ady;
  pen_e           box_color;

  always_comb begin
    nx = 32'(yel_x >> SHIFT) < CW ? XW'(yel_x >> SHIFT) : XW'(CW - 1);
    ny = 32'(yel_y >> SHIFT) < CH ? YW'(yel_y >> SHIFT) : YW'(CH - 1);
    px = smooth_valid ? XW'(({1'b0, sm_x} + {1'b0, nx}) >> 1) : nx;
    py = smooth_valid ? YW'(({1'b0, sm_y} + {1'b0, ny}) >> 1) : ny;
    down_now = yel_present && !red_present;
    in_pal   = 32'(px) < PAL_W;
    adx = (px >= last_x) ? {1'b0, px - last_x} : {1'b0, last_x - px};
    ady = (py >= last_y) ? {1'b0, py - last_y} : {1'b0, last_y - py};
    near = adx <= (XW+1)'(MAX_JUMP) && ady <= (YW+1)'(MAX_JUMP);
    if      (py < YW'(BOX_H))     box_color = PEN_RED;
    else if (py < YW'(2 * BOX_H)) box_color = PEN_GREEN;
    else if (py < YW'(3 * BOX_H)) box_color = PEN_BLUE;
    else                          box_color = PEN_WHITE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      smooth_valid <= 1'b0;
      sm_x         <= '0;
      sm_y         <= '0;
      last_x       <= '0;
      last_y       <= '0;
      last_valid   <= 1'b0;
      cursor_on    <= 1'b0;
      cursor_x     <= '0;
      cursor_y     <= '0;
      pen_color    <= PEN_RED;
      pen_down     <= 1'b0;
      draw_start   <= 1'b0;
      draw_x0      <= '0;
      draw_y0      <= '0;
      draw_x1      <= '0;
      draw_y1      <= '0;
      draw_color   <= PEN_RED;
      draw_eraser  <= 1'b0;
      frame_done   <= 1'b0;
    end else begin
      draw_start <= 1'b0;
      frame_done <= 1'b0;
      unique case (state)
        S_IDLE: if (det_done) begin
          // cursor follows the (smoothed) yellow marker
          cursor_on    <= yel_present;
          smooth_valid <= yel_present;
          if (yel_present) begin
            sm_x     <= px;
            sm_y     <= py;
            cursor_x <= px;
            cursor_y <= py;
          end
          pen_down <= down_now;
          // click = pen was down and is released over the palette
          if (pen_down && !down_now && yel_present && in_pal)
            pen_color <= box_color;
          if (down_now && !in_pal) begin
            last_x     <= px;
            last_y     <= py;
            last_valid <= 1'b1;
            if (!last_valid || near) begin
              // new stroke: a single point; continuing stroke: a line
              draw_x0     <= last_valid ? last_x : px;
              draw_y0     <= last_valid ? last_y : py;
              draw_x1     <= px;
              draw_y1     <= py;
              draw_color  <= pen_color;
              draw_eraser <= (pen_color == PEN_WHITE);
              draw_start  <= 1'b1;
              state       <= S_DRAW;
            end else begin
              frame_done <= 1'b1;   // jump too long: noise, no stroke
            end
          end else begin
            last_valid <= 1'b0;
            frame_done <= 1'b1;
          end
        end
        S_DRAW: if (draw_done) begin
          state      <= S_IDLE;
          frame_done <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
