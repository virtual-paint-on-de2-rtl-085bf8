// color_detect: per-pixel marker colour classification (colour segmentation).
//
// Each RGB pixel read from the frame buffer is tested against fixed
// thresholds and against the relative intensity of its own channels:
//   red    : R >= RED_MIN and R exceeds both G and B by more than MARGIN
//   yellow : R >= YEL_MIN and G >= YEL_MIN, both exceed B by more than
//            MARGIN, and R is not more than MARGIN above G
// The last yellow term keeps the two classes disjoint.
// A white or grey background has all three channels close together and so
// matches neither. Using a threshold compare plus a relative-intensity compare
// on red and yellow is the design's method; the exact inequalities and the
// threshold values are this implementation's choice and are parameters.
// Timing: one register stage; out_valid, is_red and is_yellow follow
// in_valid by one clock, with the pixel's x and y passed along.
module color_detect
  import vp_pkg::*;
#(
  parameter int unsigned XW      = 12,
  parameter int unsigned YW      = 12,
  parameter int unsigned RED_MIN = 512,
  parameter int unsigned YEL_MIN = 512,
  parameter int unsigned MARGIN  = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  input  rgb_t          in_rgb,
  input  logic          in_valid,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  output logic          out_valid,
  output logic          is_red,
  output logic          is_yellow,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y
);

  // One extra bit so that channel + MARGIN cannot wrap.
  typedef logic [CH_W:0] wide_t;

  wide_t r, g, b;
  logic  red_c, yel_c;

  always_comb begin
    r = wide_t'(in_rgb.r);
    g = wide_t'(in_rgb.g);
    b = wide_t'(in_rgb.b);
    red_c = (r >= wide_t'(RED_MIN)) && (r > g + wide_t'(MARGIN)) && (r > b + wide_t'(MARGIN));
    yel_c = (r >= wide_t'(YEL_MIN)) && (g >= wide_t'(YEL_MIN)) &&
            (r > b + wide_t'(MARGIN)) && (g > b + wide_t'(MARGIN)) &&
            (r <= g + wide_t'(MARGIN));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      is_red    <= 1'b0;
      is_yellow <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      is_red    <= in_valid && red_c;
      is_yellow <= in_valid && yel_c;
      out_x     <= in_x;
      out_y     <= in_y;
    end
  end

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(is_red && is_yellow));

endmodule
