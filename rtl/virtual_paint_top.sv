// virtual_paint_top: camera-driven "paint in the air" system.
//
// A camera watches the user's hand, which wears a yellow marker on one
// finger and a red marker on another. The raw Bayer stream from the sensor
// is captured (ccd_capture), converted to 30-bit RGB at half resolution
// (raw2rgb), mirrored left-right (mirror_col) and written to a one-frame
// image store (frame_buffer). The main control (main_ctrl) scans that store,
// finds the two markers by colour, computes their centres and turns them
// into a cursor, a pen up/down state, a palette choice and line strokes,
// which it writes as 2-bit colour codes into the canvas memory (canvas_mem).
// The VGA controller (vga_ctrl) shows the canvas with a colour palette at
// the left edge and the cursor on top. At reset the sensor's registers are
// written over I2C (i2c_ccd_config), the exposure coming from the switches,
// and reset_delay holds the logic in reset for a settling time.
// Everything runs on one clock: the sensor pixel clock, the VGA pixel clock
// and the I2C engine's reference are all clk here, where the board uses
// separate clocks and a PLL. The display has the resolution of the camera
// image (IMG_W x IMG_H, 640 x 480 by default) and the canvas has half that in
// each direction. Ports are plain pins: camera data and strobes
// in, sensor reset/trigger and I2C out, video DAC signals out, and the
// cursor position for the board's LEDs.
module virtual_paint_top
  import vp_pkg::*;
#(
  parameter int unsigned SENSOR_W    = 1280,
  parameter int unsigned IMG_W       = 640,
  parameter int unsigned IMG_H       = 480,
  parameter int unsigned CW          = 320,
  parameter int unsigned CH          = 240,
  parameter int unsigned PAL_W       = 64,     // palette strip, screen pixels
  parameter int unsigned MAX_JUMP    = 20,
  parameter int unsigned MIN_PIXELS  = 64,
  parameter int unsigned RESET_DELAY = 1_000_000,
  parameter int unsigned I2C_DIV     = 125,
  parameter int unsigned CXW         = $clog2(CW),
  parameter int unsigned CYW         = $clog2(CH)
) (
  input  logic             clk,
  input  logic             rst_n,        // board reset key, active low
  input  logic [15:0]      sw_exposure,  // toggle switches: sensor exposure
  // camera
  input  logic [RAW_W-1:0] ccd_data,
  input  logic             ccd_fval,
  input  logic             ccd_lval,
  output logic             ccd_reset_n,
  output logic             ccd_trigger,
  output logic             i2c_sclk,
  output logic             i2c_sda_oe,
  input  logic             i2c_sda_in,
  output logic             cfg_done,
  // video DAC
  output chan_t            vga_r,
  output chan_t            vga_g,
  output chan_t            vga_b,
  output logic             vga_hs,
  output logic             vga_vs,
  output logic             vga_blank_n,
  // status LEDs
  output logic [CXW-1:0]   led_cursor_x,
  output logic [CYW-1:0]   led_cursor_y,
  output logic             led_pen_down
);

  localparam int unsigned IXW = 12;
  localparam int unsigned IYW = 12;

  logic sys_rst_n;

  logic [RAW_W-1:0] cap_data;
  logic             cap_dval;
  logic [IXW-1:0]   cap_x;
  logic [IYW-1:0]   cap_y;
  logic [31:0]      cap_frames;

  rgb_t             rgb_pix, mir_pix, fb_rgb;
  logic             rgb_valid, mir_valid, fb_valid, fb_rd_en;
  logic [IXW-1:0]   rgb_x, mir_x, fb_x;
  logic [IYW-1:0]   rgb_y, mir_y, fb_y;

  logic             cv_wr_en, cursor_on, scan_done, clearing, vga_req, vga_fs;
  logic [CXW-1:0]   cv_wr_x, cv_rd_x, cursor_x;
  logic [CYW-1:0]   cv_wr_y, cv_rd_y, cursor_y;
  pen_e             cv_wr_data, cv_rd_data, pen_color;
  logic [$clog2(IMG_W*IMG_H+1)-1:0] red_count, yel_count;

  reset_delay #(.DELAY(RESET_DELAY)) u_rst (
    .clk, .rst_n_i(rst_n), .rst_n_o(sys_rst_n)
  );

  assign ccd_reset_n = sys_rst_n;
  assign ccd_trigger = 1'b1;

  i2c_ccd_config #(.CLK_DIV(I2C_DIV)) u_i2c (
    .clk, .rst_n(sys_rst_n), .exposure(sw_exposure),
    .sclk(i2c_sclk), .sda_oe(i2c_sda_oe), .sda_in(i2c_sda_in), .cfg_done
  );

  ccd_capture #(.RAW_W(RAW_W), .XW(IXW), .YW(IYW)) u_cap (
    .clk, .rst_n(sys_rst_n),
    .ccd_data, .ccd_fval, .ccd_lval,
    .data_o(cap_data), .dval_o(cap_dval), .x_o(cap_x), .y_o(cap_y), .frame_cnt_o(cap_frames)
  );

  raw2rgb #(.SENSOR_W(SENSOR_W), .XW(IXW), .YW(IYW)) u_bayer (
    .clk, .rst_n(sys_rst_n),
    .in_data(cap_data), .in_valid(cap_dval), .in_x(cap_x), .in_y(cap_y),
    .out_rgb(rgb_pix), .out_valid(rgb_valid), .out_x(rgb_x), .out_y(rgb_y)
  );

  mirror_col #(.W(IMG_W), .XW(IXW), .YW(IYW)) u_mirror (
    .clk, .rst_n(sys_rst_n),
    .in_rgb(rgb_pix), .in_valid(rgb_valid), .in_x(rgb_x), .in_y(rgb_y),
    .out_rgb(mir_pix), .out_valid(mir_valid), .out_x(mir_x), .out_y(mir_y)
  );

  frame_buffer #(.W(IMG_W), .H(IMG_H), .XW(IXW), .YW(IYW)) u_fb (
    .clk, .rst_n(sys_rst_n),
    .wr_en(mir_valid), .wr_x(mir_x), .wr_y(mir_y), .wr_rgb(mir_pix),
    .rd_en(fb_rd_en), .rd_x(fb_x), .rd_y(fb_y), .rd_rgb(fb_rgb), .rd_valid(fb_valid)
  );

  main_ctrl #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .IXW(IXW), .IYW(IYW), .CW(CW), .CH(CH),
    .SHIFT($clog2(IMG_W / CW)), .PAL_W(PAL_W * CW / IMG_W), .MAX_JUMP(MAX_JUMP),
    .MIN_PIXELS(MIN_PIXELS), .CXW(CXW), .CYW(CYW)
  ) u_main (
    .clk, .rst_n(sys_rst_n),
    .fb_rd_en, .fb_rd_x(fb_x), .fb_rd_y(fb_y), .fb_rd_rgb(fb_rgb), .fb_rd_valid(fb_valid),
    .cv_wr_en, .cv_wr_x, .cv_wr_y, .cv_wr_data,
    .cursor_on, .cursor_x, .cursor_y, .pen_color, .pen_down(led_pen_down),
    .red_count, .yel_count, .scan_done
  );

  canvas_mem #(.W(CW), .H(CH), .XW(CXW), .YW(CYW)) u_canvas (
    .clk, .rst_n(sys_rst_n), .clearing,
    .wr_en(cv_wr_en), .wr_x(cv_wr_x), .wr_y(cv_wr_y), .wr_data(cv_wr_data),
    .rd_x(cv_rd_x), .rd_y(cv_rd_y), .rd_data(cv_rd_data)
  );

  vga_ctrl #(
    .H_ACT(IMG_W), .V_ACT(IMG_H),
    .SHIFT($clog2(IMG_W / CW)), .PAL_W(PAL_W), .CXW(CXW), .CYW(CYW)
  ) u_vga (
    .clk, .rst_n(sys_rst_n),
    .req(vga_req), .rd_x(cv_rd_x), .rd_y(cv_rd_y), .rd_data(cv_rd_data),
    .cursor_on, .cursor_x, .cursor_y,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n, .frame_start(vga_fs)
  );

  assign led_cursor_x = cursor_x;
  assign led_cursor_y = cursor_y;

endmodule
