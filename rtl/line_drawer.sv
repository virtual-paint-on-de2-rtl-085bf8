// line_drawer: rasterises a straight line into the canvas memory.
//
// Between the marker centre of the previous frame and that of the current
// frame the design draws a straight line, so that a fast-moving finger leaves
// a continuous stroke instead of separate dots. A pen colour is drawn one
// canvas pixel wide; the eraser (white) is a 3x3 square, as the design
// specifies. The line is stepped with the integer Bresenham algorithm (our
// choice of line algorithm). Every point is written to the canvas through
// the write port (wr_en, wr_x, wr_y, wr_data), one write per clock; brush
// pixels that fall outside the W x H canvas are skipped.
// Interface: pulse start with the end points, colour and eraser flag while
// busy is low; done pulses on the clock after the last write.
// Timing: a line of N points takes N clocks with the pen and 9N with the
// eraser, plus one clock to start.
module line_drawer
  import vp_pkg::*;
#(
  parameter int unsigned W  = 320,
  parameter int unsigned H  = 240,
  parameter int unsigned XW = $clog2(W),
  parameter int unsigned YW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XW-1:0] x0,
  input  logic [YW-1:0] y0,
  input  logic [XW-1:0] x1,
  input  logic [YW-1:0] y1,
  input  pen_e          color,
  input  logic          eraser,
  output logic          busy,
  output logic          done,
  output logic          wr_en,
  output logic [XW-1:0] wr_x,
  output logic [YW-1:0] wr_y,
  output pen_e          wr_data
);

  localparam int unsigned SW = ((XW > YW) ? XW : YW) + 3;
  typedef logic signed [SW-1:0] s_t;

  s_t          cx, cy, ex, ey, dx, dy, err, sx, sy;
  logic [1:0]  bx, by;          // brush offsets 0..2 map to -1..+1
  logic        big;
  pen_e        col;

  s_t e2, px, py;
  logic last_brush, at_end, in_range;

  always_comb begin
    e2         = err <<< 1;
    px         = big ? cx + s_t'(bx) - s_t'(1) : cx;
    py         = big ? cy + s_t'(by) - s_t'(1) : cy;
    last_brush = !big || (bx == 2'd2 && by == 2'd2);
    at_end     = (cx == ex) && (cy == ey);
    in_range   = (px >= 0) && (px < s_t'(W)) && (py >= 0) && (py < s_t'(H));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      cx      <= '0;
      cy      <= '0;
      ex      <= '0;
      ey      <= '0;
      dx      <= '0;
      dy      <= '0;
      err     <= '0;
      sx      <= '0;
      sy      <= '0;
      bx      <= '0;
      by      <= '0;
      big     <= 1'b0;
      col     <= PEN_WHITE;
      wr_en   <= 1'b0;
      wr_x    <= '0;
      wr_y    <= '0;
      wr_data <= PEN_WHITE;
    end else begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      if (!busy) begin
        if (start) begin
          s_t ax, ay, bxe, bye;
          ax  = s_t'(x0);
          ay  = s_t'(y0);
          bxe = s_t'(x1);
          bye = s_t'(y1);
          cx  <= ax;
          cy  <= ay;
          ex  <= bxe;
          ey  <= bye;
          dx  <= (bxe >= ax) ? bxe - ax : ax - bxe;
          dy  <= (bye >= ay) ? ay - bye : bye - ay;      // -|dy|
          err <= ((bxe >= ax) ? bxe - ax : ax - bxe) + ((bye >= ay) ? ay - bye : bye - ay);
          sx  <= (bxe >= ax) ? s_t'(1) : -s_t'(1);
          sy  <= (bye >= ay) ? s_t'(1) : -s_t'(1);
          bx  <= '0;
          by  <= '0;
          big <= eraser;
          col <= eraser ? PEN_WHITE : color;
          busy <= 1'b1;
        end
      end else begin
        // emit one brush pixel of the current point
        wr_en   <= in_range;
        wr_x    <= XW'(px);
        wr_y    <= YW'(py);
        wr_data <= col;
        if (!last_brush) begin
          if (bx == 2'd2) begin
            bx <= '0;
            by <= by + 1'b1;
          end else begin
            bx <= bx + 1'b1;
          end
        end else begin
          bx <= '0;
          by <= '0;
          if (at_end) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            // Bresenham step to the next point
            if (e2 >= dy && e2 <= dx) begin
              err <= err + dy + dx;
              cx  <= cx + sx;
              cy  <= cy + sy;
            end else if (e2 >= dy) begin
              err <= err + dy;
              cx  <= cx + sx;
            end else begin
              err <= err + dx;
              cy  <= cy + sy;
            end
          end
        end
      end
    end
  end

endmodule
