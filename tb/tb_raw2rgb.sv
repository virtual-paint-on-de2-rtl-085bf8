// tb_raw2rgb: streams random Bayer frames (G R / B G tiles) with gaps in the
// valid strobe and compares every RGB output pixel with the tile average
// computed in the testbench.
module tb_raw2rgb;
  import vp_pkg::*;
  localparam int SW = 8, SH = 6;
  logic clk = 0, rst_n = 0;
  logic [11:0] in_data = 0, in_x = 0, in_y = 0;
  logic in_valid = 0;
  rgb_t out_rgb;
  logic out_valid;
  logic [11:0] out_x, out_y;
  int checks = 0, failures = 0, nout = 0;
  logic [11:0] raw [SH][SW];
  rgb_t exp_q [$];
  int   exp_xq [$], exp_yq [$];

  raw2rgb #(.SENSOR_W(SW)) dut (.clk, .rst_n, .in_data, .in_valid, .in_x, .in_y,
                                .out_rgb, .out_valid, .out_x, .out_y);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    rgb_t e; int ex, ey;
    checks++;
    nout++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL extra output"); end
    else begin
      e = exp_q.pop_front(); ex = exp_xq.pop_front(); ey = exp_yq.pop_front();
      if (out_rgb !== e || out_x != ex || out_y != ey) begin
        failures++;
        $display("FAIL (%0d,%0d) got %h,%h,%h at (%0d,%0d) exp %h,%h,%h", ex, ey,
                 out_rgb.r, out_rgb.g, out_rgb.b, out_x, out_y, e.r, e.g, e.b);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < SH; y++)
        for (int x = 0; x < SW; x++) raw[y][x] = 12'($urandom);
      for (int y = 0; y < SH; y += 2)
        for (int x = 0; x < SW; x += 2) begin
          rgb_t e;
          e.r = raw[y][x+1][11:2];
          e.b = raw[y+1][x][11:2];
          e.g = 10'((13'(raw[y][x]) + 13'(raw[y+1][x+1])) >> 3);
          exp_q.push_back(e); exp_xq.push_back(x / 2); exp_yq.push_back(y / 2);
        end
      for (int y = 0; y < SH; y++) begin
        for (int x = 0; x < SW; x++) begin
          in_valid <= 1; in_x <= 12'(x); in_y <= 12'(y); in_data <= raw[y][x];
          @(posedge clk);
          if (($urandom & 3) == 0) begin in_valid <= 0; @(posedge clk); end
        end
        in_valid <= 0;
        repeat (4) @(posedge clk);
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (nout != 2 * (SW / 2) * (SH / 2)) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
