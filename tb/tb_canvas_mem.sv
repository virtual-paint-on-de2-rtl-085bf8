// tb_canvas_mem: checks the post-reset clear sweep (length W*H clocks, every
// pixel white afterwards, writes during the sweep ignored), then random
// writes against a reference array with one-clock registered reads.
module tb_canvas_mem;
  import vp_pkg::*;
  localparam int W = 16, H = 8;
  logic clk = 0, rst_n = 0, clearing, wr_en = 0;
  logic [3:0] wr_x = 0, rd_x = 0;
  logic [2:0] wr_y = 0, rd_y = 0;
  pen_e wr_data = PEN_WHITE, rd_data;
  pen_e ref_mem [H][W];
  int checks = 0, failures = 0, clr_cycles = 0;

  canvas_mem #(.W(W), .H(H)) dut (.clk, .rst_n, .clearing, .wr_en, .wr_x, .wr_y, .wr_data,
                                  .rd_x, .rd_y, .rd_data);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(int x, int y, pen_e e);
    rd_x <= 4'(x); rd_y <= 3'(y);
    @(posedge clk); #1;
    checks++;
    if (rd_data != e) begin failures++; $display("FAIL (%0d,%0d) got %0d exp %0d", x, y, rd_data, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // try to write during the sweep: must be ignored
    wr_en <= 1; wr_x <= 4'd15; wr_y <= 3'd7; wr_data <= PEN_BLUE;
    @(posedge clk);
    wr_en <= 0;
    clr_cycles = 1;
    while (clearing) begin @(posedge clk); clr_cycles++; end
    checks++;
    if (clr_cycles != W * H) begin failures++; $display("FAIL clear took %0d clocks", clr_cycles); end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      ref_mem[y][x] = PEN_WHITE;
      read_check(x, y, PEN_WHITE);
    end
    repeat (200) begin
      automatic int x = $urandom_range(W - 1), y = $urandom_range(H - 1);
      automatic pen_e d = pen_e'($urandom_range(3));
      ref_mem[y][x] = d;
      wr_en <= 1; wr_x <= 4'(x); wr_y <= 3'(y); wr_data <= d;
      @(posedge clk);
    end
    wr_en <= 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) read_check(x, y, ref_mem[y][x]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
