// ccd_capture: sensor pixel capture and position counters.
//
// The camera drives a 12-bit raw sample per pixel clock together with a frame
// valid (FVAL) and a line valid (LVAL) strobe. This block registers those
// inputs once and emits a pixel-valid strobe (dval_o) whenever both strobes
// are high, together with the pixel's column (x_o) and row (y_o) inside the
// frame and a running frame counter. Counting the columns, rows and frames is
// what the design asks of this block; the exact timing is our own: outputs are
// valid one clock after the pins, the column count restarts at each line and
// the row count advances when LVAL falls, and both clear when FVAL rises.
// The sensor pixel clock is taken to be clk (one clock domain).
module ccd_capture #(
  parameter int unsigned RAW_W = 12,
  parameter int unsigned XW    = 12,
  parameter int unsigned YW    = 12,
  parameter int unsigned FW    = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RAW_W-1:0] ccd_data,
  input  logic             ccd_fval,
  input  logic             ccd_lval,
  output logic [RAW_W-1:0] data_o,
  output logic             dval_o,
  output logic [XW-1:0]    x_o,
  output logic [YW-1:0]    y_o,
  output logic [FW-1:0]    frame_cnt_o
);

  logic [RAW_W-1:0] data_q;
  logic             fval_q, lval_q, fval_qq, lval_qq;
  logic [XW-1:0]    x_cnt;
  logic [YW-1:0]    y_cnt;

  // Input register stage (pins -> flops).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q  <= '0;
      fval_q  <= 1'b0;
      lval_q  <= 1'b0;
      fval_qq <= 1'b0;
      lval_qq <= 1'b0;
    end else begin
      data_q  <= ccd_data;
      fval_q  <= ccd_fval;
      lval_q  <= ccd_lval;
      fval_qq <= fval_q;
      lval_qq <= lval_q;
    end
  end

  wire frame_start = fval_q & ~fval_qq;
  wire line_end    = ~lval_q & lval_qq & fval_q;
  wire pix         = fval_q & lval_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt       <= '0;
      y_cnt       <= '0;
      frame_cnt_o <= '0;
      data_o      <= '0;
      dval_o      <= 1'b0;
      x_o         <= '0;
      y_o         <= '0;
    end else begin
      dval_o <= pix;
      data_o <= data_q;
      x_o    <= x_cnt;
      y_o    <= frame_start ? '0 : y_cnt;
      if (frame_start) begin
        frame_cnt_o <= frame_cnt_o + 1'b1;
        y_cnt       <= '0;
        x_cnt       <= pix ? XW'(1) : '0;
        x_o         <= '0;
      end else if (line_end) begin
        x_cnt <= '0;
        y_cnt <= y_cnt + 1'b1;
      end else if (pix) begin
        x_cnt <= x_cnt + 1'b1;
      end
    end
  end

endmodule
