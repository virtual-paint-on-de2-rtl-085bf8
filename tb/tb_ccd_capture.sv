// tb_ccd_capture: drives two small frames of FVAL/LVAL/DATA with line and
// frame blanking and checks every output pixel's data, column, row and the
// frame counter against values computed from the stimulus.
module tb_ccd_capture;
  localparam int W = 7, H = 4;
  logic clk = 0, rst_n = 0;
  logic [11:0] ccd_data = 0;
  logic ccd_fval = 0, ccd_lval = 0;
  logic [11:0] data_o, x_o, y_o;
  logic dval_o;
  logic [31:0] frame_cnt_o;
  int checks = 0, failures = 0, npix = 0;
  int exp_x [$], exp_y [$], exp_d [$], exp_f [$];

  ccd_capture dut (.clk, .rst_n, .ccd_data, .ccd_fval, .ccd_lval,
                   .data_o, .dval_o, .x_o, .y_o, .frame_cnt_o);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) if (rst_n && dval_o) begin
    int ex, ey, ed, ef;
    checks++;
    if (exp_x.size() == 0) begin failures++; $display("FAIL unexpected pixel"); end
    else begin
      ex = exp_x.pop_front(); ey = exp_y.pop_front(); ed = exp_d.pop_front(); ef = exp_f.pop_front();
      if (x_o != ex || y_o != ey || data_o != ed || frame_cnt_o != ef) begin
        failures++;
        $display("FAIL pixel got x=%0d y=%0d d=%h f=%0d exp x=%0d y=%0d d=%h f=%0d",
                 x_o, y_o, data_o, frame_cnt_o, ex, ey, ed, ef);
      end
    end
    npix++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 1; f <= 2; f++) begin
      repeat (5) @(posedge clk);
      ccd_fval <= 1;
      repeat (2) @(posedge clk);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          ccd_lval <= 1;
          ccd_data <= 12'((f << 10) ^ (y << 5) ^ x ^ 12'h5a0);
          exp_x.push_back(x); exp_y.push_back(y);
          exp_d.push_back(int'(12'((f << 10) ^ (y << 5) ^ x ^ 12'h5a0)));
          exp_f.push_back(f);
          @(posedge clk);
        end
        ccd_lval <= 0;
        repeat (3) @(posedge clk);
      end
      ccd_fval <= 0;
      repeat (4) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (npix != 2 * W * H || exp_x.size() != 0) begin
      failures++; $display("FAIL pixel count %0d", npix);
    end
    checks++;
    if (frame_cnt_o != 2) begin failures++; $display("FAIL frame count %0d", frame_cnt_o); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
