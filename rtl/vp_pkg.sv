// vp_pkg: types and constants shared by the virtual paint datapath.
//
// A camera pixel after Bayer conversion carries three 10-bit colour channels
// (30 bits per pixel, as the design stores it). The canvas holds one 2-bit
// pen code per pixel: 01 red, 10 green, 11 blue, 00 white. White is also the
// eraser colour. These encodings follow the design description; the struct
// and enum names are this implementation's own.
package vp_pkg;

  localparam int unsigned CH_W  = 10;  // bits per colour channel
  localparam int unsigned RAW_W = 12;  // sensor data width

  typedef logic [CH_W-1:0] chan_t;

  typedef struct packed {
    chan_t r;
    chan_t g;
    chan_t b;
  } rgb_t;

  typedef enum logic [1:0] {
    PEN_WHITE = 2'b00,
    PEN_RED   = 2'b01,
    PEN_GREEN = 2'b10,
    PEN_BLUE  = 2'b11
  } pen_e;

  // Full-scale output levels for the VGA DAC.
  localparam chan_t CH_MAX = '1;

  function automatic rgb_t pen_to_rgb(pen_e p);
    unique case (p)
      PEN_RED:   pen_to_rgb = '{r: CH_MAX, g: '0,     b: '0};
      PEN_GREEN: pen_to_rgb = '{r: '0,     g: CH_MAX, b: '0};
      PEN_BLUE:  pen_to_rgb = '{r: '0,     g: '0,     b: CH_MAX};
      default:   pen_to_rgb = '{r: CH_MAX, g: CH_MAX, b: CH_MAX};
    endcase
  endfunction

endpackage
