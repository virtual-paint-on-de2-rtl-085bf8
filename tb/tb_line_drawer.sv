// tb_line_drawer: draws random lines with the pen and with the eraser on a
// small canvas and records every write. A pen line must step the major axis
// one pixel per point with the minor coordinate within half a pixel of the
// ideal line, from start to end, 8-connected, in the pen colour, one clock
// per point. An eraser line must write a clipped white 3x3 square around
// each point of the same line, nine clocks per point.
module tb_line_drawer;
  import vp_pkg::*;
  localparam int W = 40, H = 30;
  localparam int XW = $clog2(W), YW = $clog2(H);
  logic clk = 0, rst_n = 0;
  logic start = 0, eraser = 0, busy, done, wr_en;
  logic [XW-1:0] x0 = 0, x1 = 0, wr_x;
  logic [YW-1:0] y0 = 0, y1 = 0, wr_y;
  pen_e color = PEN_RED, wr_data;
  int checks = 0, failures = 0;
  int wx [$], wy [$];
  pen_e wc [$];
  int busy_cycles;

  line_drawer #(.W(W), .H(H)) dut (.clk, .rst_n, .start, .x0, .y0, .x1, .y1, .color, .eraser,
                                   .busy, .done, .wr_en, .wr_x, .wr_y, .wr_data);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (wr_en) begin wx.push_back(wr_x); wy.push_back(wr_y); wc.push_back(wr_data); end
    if (busy) busy_cycles++;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic run(int ax, int ay, int bx, int by, pen_e c, bit er);
    wx.delete(); wy.delete(); wc.delete();
    busy_cycles = 0;
    @(posedge clk);
    start <= 1; x0 <= XW'(ax); y0 <= YW'(ay); x1 <= XW'(bx); y1 <= YW'(by);
    color <= c; eraser <= er;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  // Pen stroke: one write per point, point k is k steps along the major
  // axis, minor coordinate within half a pixel of the ideal line, steps are
  // 8-connected, both end points included, one busy clock per point.
  task automatic draw(int ax, int ay, int bx, int by, pen_e c);
    int dx = bx - ax, dy = by - ay;
    int npts = (iabs(dx) > iabs(dy) ? iabs(dx) : iabs(dy)) + 1;
    bit ok = 1;
    run(ax, ay, bx, by, c, 0);
    checks++;
    if (wx.size() != npts) ok = 0;
    else for (int k = 0; k < npts; k++) begin
      real ideal, t;
      if (iabs(dx) >= iabs(dy)) begin
        if (wx[k] != ax + (dx < 0 ? -k : k)) ok = 0;
        ideal = (npts == 1) ? ay : ay + real'(dy) * k / (npts - 1);
        t = wy[k] - ideal;
      end else begin
        if (wy[k] != ay + (dy < 0 ? -k : k)) ok = 0;
        ideal = (npts == 1) ? ax : ax + real'(dx) * k / (npts - 1);
        t = wx[k] - ideal;
      end
      if (t > 0.5001 || t < -0.5001) ok = 0;
      if (wc[k] != c) ok = 0;
    end
    if (!ok) begin
      failures++;
      $display("FAIL pen line (%0d,%0d)-(%0d,%0d): %0d writes for %0d points", ax, ay, bx, by, wx.size(), npts);
    end
    if (ok) begin
      checks++;
      if (wx[0] != ax || wy[0] != ay || wx[npts-1] != bx || wy[npts-1] != by) begin
        failures++; $display("FAIL endpoints of (%0d,%0d)-(%0d,%0d)", ax, ay, bx, by);
      end
      for (int k = 1; k < npts; k++) begin
        int sx = wx[k] - wx[k-1], sy = wy[k] - wy[k-1];
        checks++;
        if (iabs(sx) > 1 || iabs(sy) > 1 || (sx == 0 && sy == 0)) begin
          failures++; $display("FAIL step %0d not 8-connected", k);
        end
      end
    end
    checks++;
    if (busy_cycles != npts) begin failures++; $display("FAIL %0d busy clocks for %0d points", busy_cycles, npts); end
  endtask

  // Eraser stroke: the pen's points, each widened to a 3x3 square written
  // row by row, squares clipped at the canvas border, always white, nine
  // busy clocks per point.
  task automatic erase(int ax, int ay, int bx, int by);
    int px [$], py [$], ex [$], ey [$];
    bit ok = 1;
    run(ax, ay, bx, by, PEN_BLUE, 0);
    px = wx; py = wy;
    run(ax, ay, bx, by, PEN_BLUE, 1);
    foreach (px[k])
      for (int oy = -1; oy <= 1; oy++)
        for (int ox = -1; ox <= 1; ox++)
          if (px[k] + ox >= 0 && px[k] + ox < W && py[k] + oy >= 0 && py[k] + oy < H) begin
            ex.push_back(px[k] + ox); ey.push_back(py[k] + oy);
          end
    checks++;
    if (wx.size() != ex.size()) ok = 0;
    else foreach (ex[i]) if (wx[i] != ex[i] || wy[i] != ey[i] || wc[i] != PEN_WHITE) ok = 0;
    if (!ok) begin
      failures++; $display("FAIL eraser (%0d,%0d)-(%0d,%0d): %0d writes, %0d expected", ax, ay, bx, by, wx.size(), ex.size());
    end
    checks++;
    if (busy_cycles != 9 * px.size()) begin failures++; $display("FAIL eraser busy %0d", busy_cycles); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    draw(5, 5, 5, 5, PEN_RED);      // single point
    draw(2, 3, 20, 3, PEN_GREEN);   // horizontal
    draw(7, 25, 7, 2, PEN_BLUE);    // vertical, upwards
    draw(30, 2, 10, 12, PEN_RED);   // shallow, leftwards
    draw(3, 3, 9, 21, PEN_GREEN);   // steep
    erase(0, 0, 4, 4);              // clipped at the origin corner
    erase(39, 29, 35, 20);          // clipped at the far corner
    erase(10, 10, 14, 11);
    for (int i = 0; i < 30; i++)
      draw($urandom_range(W - 1), $urandom_range(H - 1), $urandom_range(W - 1), $urandom_range(H - 1),
           pen_e'($urandom_range(3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
