// vga_ctrl: 640x480 VGA timing, canvas read-out, palette and cursor overlay.
//
// Horizontal and vertical counters produce the standard 640x480 at 60 Hz
// frame (800 x 525 clocks including blanking, negative HS and VS pulses; at a
// 25 MHz pixel clock). For every visible pixel the controller requests the
// canvas pixel under it (canvas coordinates = screen coordinates >> SHIFT),
// turns the returned 2-bit pen code into a 30-bit colour (01 red, 10 green,
// 11 blue, 00 white) and drives the 10-bit R, G, B inputs of the video DAC.
// A multiplexer in front of the DAC replaces the canvas by the colour palette
// where the screen x is below PAL_W (four equal boxes top to bottom: red,
// green, blue, white) and draws a grey cross-hair cursor through the cursor
// position while the cursor is on. The code-to-colour map and the palette
// multiplexer follow the design; the timing numbers, palette geometry and
// cursor shape are this implementation's choices.
// Timing: rd_x/rd_y and req are issued with the counters; the canvas answers
// one clock later; all DAC-side outputs (colour, hs, vs, blank_n) are then
// registered, so the picture and syncs leave two clocks after the counters.
module vga_ctrl
  import vp_pkg::*;
#(
  parameter int unsigned H_ACT   = 640,
  parameter int unsigned H_FP    = 16,
  parameter int unsigned H_SYNC  = 96,
  parameter int unsigned H_BP    = 48,
  parameter int unsigned V_ACT   = 480,
  parameter int unsigned V_FP    = 10,
  parameter int unsigned V_SYNC  = 2,
  parameter int unsigned V_BP    = 33,
  parameter int unsigned SHIFT   = 1,
  parameter int unsigned PAL_W   = 64,
  parameter int unsigned CXW     = 9,
  parameter int unsigned CYW     = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  // canvas read port
  output logic           req,
  output logic [CXW-1:0] rd_x,
  output logic [CYW-1:0] rd_y,
  input  pen_e           rd_data,
  // overlay
  input  logic           cursor_on,
  input  logic [CXW-1:0] cursor_x,
  input  logic [CYW-1:0] cursor_y,
  // to the video DAC
  output chan_t          vga_r,
  output chan_t          vga_g,
  output chan_t          vga_b,
  output logic           vga_hs,
  output logic           vga_vs,
  output logic           vga_blank_n,
  output logic           frame_start
);

  localparam int unsigned H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_ACT + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW    = $clog2(H_TOT);
  localparam int unsigned VW    = $clog2(V_TOT);
  localparam int unsigned BOX_H = V_ACT / 4;
  localparam chan_t       GREY  = chan_t'(CH_MAX >> 1);

  logic [HW-1:0] hcnt, h1;
  logic [VW-1:0] vcnt, v1;
  logic          act1, hs1, vs1;
  rgb_t          pix;

  wire act0 = hcnt < HW'(H_ACT) && vcnt < VW'(V_ACT);
  wire hs0  = !(hcnt >= HW'(H_ACT + H_FP) && hcnt < HW'(H_ACT + H_FP + H_SYNC));
  wire vs0  = !(vcnt >= VW'(V_ACT + V_FP) && vcnt < VW'(V_ACT + V_FP + V_SYNC));

  assign req  = act0;
  assign rd_x = CXW'(hcnt >> SHIFT);
  assign rd_y = CYW'(vcnt >> SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt <= '0;
      vcnt <= '0;
    end else if (hcnt == HW'(H_TOT - 1)) begin
      hcnt <= '0;
      vcnt <= (vcnt == VW'(V_TOT - 1)) ? '0 : vcnt + 1'b1;
    end else begin
      hcnt <= hcnt + 1'b1;
    end
  end

  // colour multiplexer in front of the DAC
  always_comb begin
    if (h1 < HW'(PAL_W)) begin
      if      (v1 < VW'(BOX_H))     pix = pen_to_rgb(PEN_RED);
      else if (v1 < VW'(2 * BOX_H)) pix = pen_to_rgb(PEN_GREEN);
      else if (v1 < VW'(3 * BOX_H)) pix = pen_to_rgb(PEN_BLUE);
      else                          pix = pen_to_rgb(PEN_WHITE);
    end else if (cursor_on && (CXW'(h1 >> SHIFT) == cursor_x || CYW'(v1 >> SHIFT) == cursor_y)) begin
      pix = '{r: GREY, g: GREY, b: GREY};
    end else begin
      pix = pen_to_rgb(rd_data);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h1          <= '0;
      v1          <= '0;
      act1        <= 1'b0;
      hs1         <= 1'b1;
      vs1         <= 1'b1;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      h1          <= hcnt;
      v1          <= vcnt;
      act1        <= act0;
      hs1         <= hs0;
      vs1         <= vs0;
      vga_r       <= act1 ? pix.r : '0;
      vga_g       <= act1 ? pix.g : '0;
      vga_b       <= act1 ? pix.b : '0;
      vga_hs      <= hs1;
      vga_vs      <= vs1;
      vga_blank_n <= act1;
      frame_start <= (hcnt == '0) && (vcnt == '0);
    end
  end

endmodule
