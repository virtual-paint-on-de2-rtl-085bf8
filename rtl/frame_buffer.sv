// frame_buffer: one-frame RGB image store between the camera path and the
// main control.
//
// The design keeps the camera image in external SDRAM behind a multi-port
// controller, each 30-bit pixel (three 10-bit channels) taking two 16-bit
// memory words. This block models that store as a simple dual-port memory
// with the same organisation: two 16-bit word arrays, one word of each per
// pixel address. Word A holds {0, R[9:0], G[9:5]}, word B holds
// {0, G[4:0], B[9:0]}; the split of the bits is this implementation's choice.
// The write port takes the mirrored camera stream (x, y, rgb); the read port
// takes an (x, y) request and returns the pixel one clock later with
// rd_valid. Address = y*W + x. The SDRAM controller's arbitration, refresh
// and FIFOs are not modelled: both ports always complete in one clock.
module frame_buffer
  import vp_pkg::*;
#(
  parameter int unsigned W  = 640,
  parameter int unsigned H  = 480,
  parameter int unsigned XW = 12,
  parameter int unsigned YW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side (camera)
  input  logic          wr_en,
  input  logic [XW-1:0] wr_x,
  input  logic [YW-1:0] wr_y,
  input  rgb_t          wr_rgb,
  // read side (main control)
  input  logic          rd_en,
  input  logic [XW-1:0] rd_x,
  input  logic [YW-1:0] rd_y,
  output rgb_t          rd_rgb,
  output logic          rd_valid
);

  localparam int unsigned DEPTH = W * H;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [15:0] word_a [DEPTH];
  logic [15:0] word_b [DEPTH];
  logic [15:0] qa, qb;

  wire          wr_ok = wr_en && 32'(wr_x) < W && 32'(wr_y) < H;
  wire [AW-1:0] wa    = AW'(wr_y) * AW'(W) + AW'(wr_x);
  wire [AW-1:0] ra    = AW'(rd_y) * AW'(W) + AW'(rd_x);

  always_ff @(posedge clk) begin
    if (wr_ok) begin
      word_a[wa] <= {1'b0, wr_rgb.r, wr_rgb.g[CH_W-1 -: 5]};
      word_b[wa] <= {1'b0, wr_rgb.g[4:0], wr_rgb.b};
    end
    if (rd_en) begin
      qa <= word_a[ra];
      qb <= word_b[ra];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en && 32'(rd_x) < W && 32'(rd_y) < H;
  end

  assign rd_rgb.r = qa[14:5];
  assign rd_rgb.g = {qa[4:0], qb[14:10]};
  assign rd_rgb.b = qb[9:0];

endmodule
