// tb_centroid: runs several frames of random hits (including an empty frame
// and one below the minimum pixel count) and checks centre, count, presence
// and the divider latency (done rises SUM_W+1 clocks after the edge that samples frame_end).
module tb_centroid;
  localparam int MAXP = 100, MINP = 4;
  localparam int CNT_W = $clog2(MAXP + 1), SUM_W = 12 + CNT_W;
  logic clk = 0, rst_n = 0;
  logic frame_start = 0, hit = 0, frame_end = 0;
  logic [11:0] x = 0, y = 0, cx, cy;
  logic done, present;
  logic [CNT_W-1:0] count;
  int checks = 0, failures = 0;

  centroid #(.MAX_PIXELS(MAXP), .MIN_PIXELS(MINP)) dut (
    .clk, .rst_n, .frame_start, .hit, .x, .y, .frame_end, .done, .present, .cx, .cy, .count);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(int nhits);
    int sx = 0, sy = 0, lat = 0;
    frame_start <= 1; @(posedge clk); frame_start <= 0;
    for (int i = 0; i < nhits; i++) begin
      int px = $urandom_range(639), py = $urandom_range(479);
      hit <= 1; x <= 12'(px); y <= 12'(py);
      sx += px; sy += py;
      @(posedge clk);
      hit <= 0; x <= 12'($urandom);   // non-hit pixel between hits
      @(posedge clk);
    end
    frame_end <= 1; @(posedge clk); frame_end <= 0;
    // this edge sampled frame_end; count edges until done is high
    #1 lat = 0;
    while (!done && lat < 200) begin @(posedge clk); #1 lat++; end
    checks++;
    if (lat != SUM_W + 1) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (count != CNT_W'(nhits) || present != (nhits >= MINP)) begin
      failures++; $display("FAIL n=%0d count=%0d present=%0b", nhits, count, present);
    end
    if (nhits > 0) begin
      checks++;
      if (cx != 12'(sx / nhits) || cy != 12'(sy / nhits)) begin
        failures++; $display("FAIL centre (%0d,%0d) exp (%0d,%0d)", cx, cy, sx / nhits, sy / nhits);
      end
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_frame(20);
    run_frame(0);
    run_frame(3);
    run_frame(1);
    for (int i = 0; i < 10; i++) run_frame($urandom_range(MAXP, MINP));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
