// centroid: mean position of the pixels of one marker colour in a frame.
//
// While a frame is scanned, every pixel flagged by the colour detector adds
// one to a counter and adds its x and y to two running sums. When the scan
// ends (frame_end), the sums are divided by the count in two sequential
// dividers running side by side, giving the marker centre (cx, cy). This
// count-sum-divide scheme is the design's. Our own additions: a marker counts
// as present only if at least MIN_PIXELS pixels matched, which rejects
// isolated noise pixels, and the division is a bit-serial restoring divider.
// Timing: done rises SUM_W+1 clocks after the edge that samples frame_end
// (32 at the default sizes); frame_start clears the accumulators. frame_end must not come while
// the previous division is still running.
module centroid #(
  parameter int unsigned XW         = 12,
  parameter int unsigned YW         = 12,
  parameter int unsigned MAX_PIXELS = 640 * 480,
  parameter int unsigned MIN_PIXELS = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_start,
  input  logic          hit,
  input  logic [XW-1:0] x,
  input  logic [YW-1:0] y,
  input  logic          frame_end,
  output logic          done,
  output logic          present,
  output logic [XW-1:0] cx,
  output logic [YW-1:0] cy,
  output logic [$clog2(MAX_PIXELS+1)-1:0] count
);

  localparam int unsigned CNT_W = $clog2(MAX_PIXELS + 1);
  localparam int unsigned CW    = (XW > YW) ? XW : YW;
  localparam int unsigned SUM_W = CW + CNT_W;

  logic [CNT_W-1:0] cnt;
  logic [SUM_W-1:0] sum_x, sum_y;
  logic             busy_x, busy_y, done_x, done_y;
  logic [SUM_W-1:0] qx, qy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      sum_x <= '0;
      sum_y <= '0;
    end else if (frame_start) begin
      cnt   <= '0;
      sum_x <= '0;
      sum_y <= '0;
    end else if (hit) begin
      cnt   <= cnt + 1'b1;
      sum_x <= sum_x + SUM_W'(x);
      sum_y <= sum_y + SUM_W'(y);
    end
  end

  seq_divider #(.NW(SUM_W), .DW(CNT_W)) u_div_x (
    .clk, .rst_n, .start(frame_end), .dividend(sum_x), .divisor(cnt),
    .busy(busy_x), .done(done_x), .quotient(qx)
  );

  seq_divider #(.NW(SUM_W), .DW(CNT_W)) u_div_y (
    .clk, .rst_n, .start(frame_end), .dividend(sum_y), .divisor(cnt),
    .busy(busy_y), .done(done_y), .quotient(qy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done    <= 1'b0;
      present <= 1'b0;
      cx      <= '0;
      cy      <= '0;
      count   <= '0;
    end else begin
      done <= done_x;
      if (frame_end) count <= cnt;
      if (done_x) begin
        present <= (count >= CNT_W'(MIN_PIXELS)) && (count != '0);
        cx      <= XW'(qx);
        cy      <= YW'(qy);
      end
    end
  end

  a_div_lockstep: assert property (@(posedge clk) disable iff (!rst_n) done_x == done_y);
  a_no_restart:   assert property (@(posedge clk) disable iff (!rst_n) frame_end |-> !busy_x);

endmodule
