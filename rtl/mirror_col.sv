// mirror_col: left-right mirror of the camera image.
//
// The sensor sees the user from the front, so without correction a hand
// moving right would move left on screen. This block turns every image line
// around. It holds two line buffers (ping-pong, selected by the row's lowest
// bit): the incoming line is written into one while the line before it is
// read out of the other from its last column down to its first. The output
// stream therefore carries the same rows, one line late, with column x of
// the output equal to column W-1-x of the input, and with out_x counting up.
// Reading runs at one pixel per clock, so any input line that takes at least
// W clocks (true for a stream with at most one pixel per clock) is finished
// reading before the next line completes. That mirroring is needed is the
// design's; the ping-pong line buffer is this implementation's choice.
module mirror_col
  import vp_pkg::*;
#(
  parameter int unsigned W  = 640,
  parameter int unsigned XW = 12,
  parameter int unsigned YW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  rgb_t          in_rgb,
  input  logic          in_valid,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  output rgb_t          out_rgb,
  output logic          out_valid,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y
);

  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1;

  rgb_t buf0 [W];
  rgb_t buf1 [W];

  logic          rd_active;
  logic          rd_bank;
  logic [XW-1:0] rd_addr;
  logic [YW-1:0] rd_y;
  logic          s_valid;
  logic          s_bank;
  logic [XW-1:0] s_x;
  logic [YW-1:0] s_y;
  rgb_t          q0, q1;

  wire in_ok = in_valid && (32'(in_x) < W);

  always_ff @(posedge clk) begin
    if (in_ok && !in_y[0]) buf0[AW'(in_x)] <= in_rgb;
    if (in_ok &&  in_y[0]) buf1[AW'(in_x)] <= in_rgb;
    q0 <= buf0[AW'(rd_addr)];
    q1 <= buf1[AW'(rd_addr)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_active <= 1'b0;
      rd_bank   <= 1'b0;
      rd_addr   <= '0;
      rd_y      <= '0;
      s_valid   <= 1'b0;
      s_bank    <= 1'b0;
      s_x       <= '0;
      s_y       <= '0;
    end else begin
      s_valid <= rd_active;
      s_bank  <= rd_bank;
      s_x     <= XW'(W - 1) - rd_addr;
      s_y     <= rd_y;
      if (in_ok && in_x == XW'(W - 1)) begin
        // a whole line is in: read it back from the last column down
        rd_active <= 1'b1;
        rd_bank   <= in_y[0];
        rd_addr   <= XW'(W - 1);
        rd_y      <= in_y;
      end else if (rd_active) begin
        if (rd_addr == '0) rd_active <= 1'b0;
        else               rd_addr   <= rd_addr - 1'b1;
      end
    end
  end

  assign out_rgb   = s_bank ? q1 : q0;
  assign out_valid = s_valid;
  assign out_x     = s_x;
  assign out_y     = s_y;

  // A new line must not complete while the previous one is still being read.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
      (in_ok && in_x == XW'(W - 1)) |-> !rd_active || rd_addr == '0);

endmodule
