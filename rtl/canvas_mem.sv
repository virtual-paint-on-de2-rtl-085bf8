// canvas_mem: the painting, one 2-bit pen code per canvas pixel.
//
// This is the on-chip block-RAM canvas of the design (2-bit data: 00 white,
// 01 red, 10 green, 11 blue). It is a simple dual-port RAM: the line drawer
// writes through one port, the VGA controller reads through the other with a
// registered (one clock) read. Address = y*W + x. The default canvas is
// 320 x 240, each canvas pixel covering 2 x 2 screen pixels of the 640 x 480
// display, which needs 153,600 bits; a full 640 x 480 canvas (614,400 bits)
// would not fit the 483,840 block-RAM bits of the FPGA the design targets.
// After reset the block sweeps every address to white, one per clock
// (W*H clocks, clearing = 1 meanwhile) and ignores writes during the sweep;
// the canvas size and the clear sweep are this implementation's choices.
module canvas_mem
  import vp_pkg::*;
#(
  parameter int unsigned W  = 320,
  parameter int unsigned H  = 240,
  parameter int unsigned XW = $clog2(W),
  parameter int unsigned YW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          clearing,
  // write port
  input  logic          wr_en,
  input  logic [XW-1:0] wr_x,
  input  logic [YW-1:0] wr_y,
  input  pen_e          wr_data,
  // read port
  input  logic [XW-1:0] rd_x,
  input  logic [YW-1:0] rd_y,
  output pen_e          rd_data
);

  localparam int unsigned DEPTH = W * H;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [1:0]    mem [DEPTH];
  logic [AW-1:0] clr_addr;
  logic          we;
  logic [AW-1:0] wa, ra;
  logic [1:0]    wd;
  logic [1:0]    q;

  always_comb begin
    ra = AW'(rd_y) * AW'(W) + AW'(rd_x);
    if (clearing) begin
      we = 1'b1;
      wa = clr_addr;
      wd = PEN_WHITE;
    end else begin
      we = wr_en && 32'(wr_x) < W && 32'(wr_y) < H;
      wa = AW'(wr_y) * AW'(W) + AW'(wr_x);
      wd = wr_data;
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
    q <= mem[ra];
  end

  assign rd_data = pen_e'(q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      if (clr_addr == AW'(DEPTH - 1)) clearing <= 1'b0;
      clr_addr <= clr_addr + 1'b1;
    end
  end

endmodule
