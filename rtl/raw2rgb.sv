// raw2rgb: Bayer colour-filter pattern to RGB.
//
// The sensor delivers one colour sample per pixel laid out as a 2x2 Bayer
// tile: even rows G R G R ..., odd rows B G B G ... Each 2x2 tile becomes one
// RGB pixel, so a SENSOR_W x SENSOR_H raw frame gives a (SENSOR_W/2) x
// (SENSOR_H/2) RGB image. Red and blue are the tile's R and B samples, green
// is the mean of its two G samples, and every channel is cut from the 12-bit
// raw width to the 10 bits per channel the design uses (30-bit pixels).
// The even row is kept in a one-line buffer (synchronous-read RAM); while the
// odd row streams in, the buffer supplies the sample above each pixel.
// The conversion to 10-bit RGB is the design's; the tile order, the
// tile-to-pixel decimation and green averaging are this implementation's.
// Timing: out_valid rises two clocks after the in_valid of the tile's last
// (odd row, odd column) sample.
module raw2rgb
  import vp_pkg::*;
#(
  parameter int unsigned SENSOR_W = 1280,
  parameter int unsigned XW       = 12,
  parameter int unsigned YW       = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RAW_W-1:0] in_data,
  input  logic             in_valid,
  input  logic [XW-1:0]    in_x,
  input  logic [YW-1:0]    in_y,
  output rgb_t             out_rgb,
  output logic             out_valid,
  output logic [XW-1:0]    out_x,
  output logic [YW-1:0]    out_y
);

  logic [RAW_W-1:0] line_buf [SENSOR_W];

  logic [RAW_W-1:0] lb_q;
  logic [RAW_W-1:0] s1_data;
  logic             s1_valid;
  logic [XW-1:0]    s1_x;
  logic [YW-1:0]    s1_y;
  logic [RAW_W-1:0] g_above, b_left;

  localparam int unsigned LBW = (SENSOR_W > 1) ? $clog2(SENSOR_W) : 1;

  // Line buffer: even rows are written, odd rows read the sample above.
  always_ff @(posedge clk) begin
    if (in_valid && !in_y[0] && 32'(in_x) < SENSOR_W)
      line_buf[LBW'(in_x)] <= in_data;
    lb_q <= line_buf[(32'(in_x) < SENSOR_W) ? LBW'(in_x) : '0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_data   <= '0;
      s1_valid  <= 1'b0;
      s1_x      <= '0;
      s1_y      <= '0;
      g_above   <= '0;
      b_left    <= '0;
      out_rgb   <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      s1_data  <= in_data;
      s1_valid <= in_valid;
      s1_x     <= in_x;
      s1_y     <= in_y;
      out_valid <= 1'b0;
      if (s1_valid && s1_y[0]) begin
        if (!s1_x[0]) begin
          // even column of an odd row: B here, G of the row above
          g_above <= lb_q;
          b_left  <= s1_data;
        end else begin
          // odd column of an odd row: G here, R of the row above
          out_rgb.r <= lb_q[RAW_W-1 -: CH_W];
          out_rgb.g <= chan_t'(({1'b0, g_above} + {1'b0, s1_data}) >> (RAW_W - CH_W + 1));
          out_rgb.b <= b_left[RAW_W-1 -: CH_W];
          out_valid <= 1'b1;
          out_x     <= s1_x >> 1;
          out_y     <= s1_y >> 1;
        end
      end
    end
  end

endmodule
