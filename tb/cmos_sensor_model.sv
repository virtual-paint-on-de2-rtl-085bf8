// cmos_sensor_model: behavioural stand-in for the camera sensor (not
// synthesizable). It streams SENSOR_W x SENSOR_H frames of 12-bit Bayer
// samples (even rows G R, odd rows B G) with FVAL/LVAL strobes and
// HBLANK/VBLANK idle clocks, one sample per clk. The scene is a near-white
// background with an optional yellow and an optional red square marker of
// MS x MS image pixels, positioned in the coordinates of the mirrored image
// the display shows (image = sensor / 2, then mirrored left-right), so a
// marker placed at image column x ends up at column x of the frame buffer.
module cmos_sensor_model #(
  parameter int SENSOR_W = 128,
  parameter int SENSOR_H = 96,
  parameter int HBLANK   = 16,
  parameter int VBLANK   = 4,
  parameter int MS       = 4
) (
  input  logic        clk,
  input  logic        run,
  input  logic        yel_on,
  input  int          yel_x,
  input  int          yel_y,
  input  logic        red_on,
  input  int          red_x,
  input  int          red_y,
  output logic [11:0] data,
  output logic        fval,
  output logic        lval,
  output int          frames
);
  localparam int IW = SENSOR_W / 2;

  function automatic logic [11:0] sample(int sx, int sy);
    int ix = IW - 1 - sx / 2, iy = sy / 2;
    int r = 1000, g = 1000, b = 990;
    if (red_on && ix >= red_x && ix < red_x + MS && iy >= red_y && iy < red_y + MS) begin
      r = 1000; g = 80; b = 60;
    end
    if (yel_on && ix >= yel_x && ix < yel_x + MS && iy >= yel_y && iy < yel_y + MS) begin
      r = 950; g = 900; b = 50;
    end
    if (sy % 2 == 0) return 12'((sx % 2 == 0 ? g : r) << 2);
    else             return 12'((sx % 2 == 0 ? b : g) << 2);
  endfunction

  initial begin
    data = 0; fval = 0; lval = 0; frames = 0;
    forever begin
      @(posedge clk);
      if (run) begin
        fval <= 1;
        repeat (2) @(posedge clk);
        for (int sy = 0; sy < SENSOR_H; sy++) begin
          for (int sx = 0; sx < SENSOR_W; sx++) begin
            lval <= 1;
            data <= sample(sx, sy);
            @(posedge clk);
          end
          lval <= 0;
          repeat (HBLANK) @(posedge clk);
        end
        fval <= 0;
        frames <= frames + 1;
        repeat (VBLANK * (SENSOR_W + HBLANK)) @(posedge clk);
      end
    end
  end
endmodule
