// tb_color_detect: feeds hand-picked marker, background and borderline
// colours plus random colours, and compares the red/yellow flags with a
// reference classifier written from the threshold rules.
module tb_color_detect;
  import vp_pkg::*;
  logic clk = 0, rst_n = 0;
  rgb_t in_rgb = '0;
  logic in_valid = 0, out_valid, is_red, is_yellow;
  logic [11:0] in_x = 0, in_y = 0, out_x, out_y;
  int checks = 0, failures = 0, nred = 0, nyel = 0;

  color_detect dut (.clk, .rst_n, .in_rgb, .in_valid, .in_x, .in_y,
                    .out_valid, .is_red, .is_yellow, .out_x, .out_y);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_class(int r, int g, int b, output bit red, output bit yel);
    red = r >= 512 && r - g > 256 && r - b > 256;
    yel = r >= 512 && g >= 512 && r - b > 256 && g - b > 256 && r - g <= 256;
  endfunction

  task automatic apply(int r, int g, int b, int tag);
    bit er, ey;
    ref_class(r, g, b, er, ey);
    in_rgb <= '{r: 10'(r), g: 10'(g), b: 10'(b)};
    in_valid <= 1; in_x <= 12'(tag); in_y <= 12'(tag >> 3);
    @(posedge clk); #1;
    checks++;
    if (!out_valid || is_red != er || is_yellow != ey || out_x != 12'(tag)) begin
      failures++;
      $display("FAIL rgb=(%0d,%0d,%0d) red=%0b/%0b yel=%0b/%0b", r, g, b, is_red, er, is_yellow, ey);
    end
    nred += er; nyel += ey;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    apply(1000, 100, 80, 1);    // red marker
    apply(950, 900, 120, 2);    // yellow marker
    apply(1000, 1000, 1000, 3); // white background
    apply(300, 20, 20, 4);      // dark red: too dim
    apply(800, 544, 0, 5);      // r-g = 256: not red, is yellow
    apply(800, 543, 0, 6);      // r-g = 257: red, not yellow
    apply(100, 900, 100, 7);    // green: neither
    apply(900, 900, 700, 8);    // pale: neither
    for (int i = 0; i < 3000; i++) apply($urandom_range(1023), $urandom_range(1023), $urandom_range(1023), i);
    in_valid <= 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid || is_red || is_yellow) begin failures++; $display("FAIL flags without valid"); end
    checks++;
    if (nred < 10 || nyel < 10) begin failures++; $display("FAIL too few marker samples"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
