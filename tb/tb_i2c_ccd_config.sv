// tb_i2c_ccd_config: an I2C slave model on the open-drain bus decodes START,
// bytes and STOP, acknowledges bytes, and refuses (NACKs) the register byte
// of the very first transfer. Checks: the bytes of every completed write
// (device 0xBA, exposure register 0x09 with the switch value, gain register
// 0x35), the retry after the refusal, START/STOP framing, SCLK period
// (4 x CLK_DIV clocks per bit) and cfg_done at the end.
module tb_i2c_ccd_config;
  localparam int DIV = 4;
  logic clk = 0, rst_n = 0;
  logic [15:0] exposure = 16'h0795;
  logic sclk, sda_oe, cfg_done;
  logic slave_pull = 0;
  wire  sda = !sda_oe && !slave_pull;
  int checks = 0, failures = 0;

  i2c_ccd_config #(.CLK_DIV(DIV)) dut (.clk, .rst_n, .exposure, .sclk, .sda_oe,
                                       .sda_in(sda), .cfg_done);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slave model
  bit prev_scl = 1, prev_sda = 1, in_xfer = 0, nack_next = 0, refused_once = 0;
  int nbits = 0, nbytes = 0, rise_t = -1, clk_n = 0, period_errs = 0, periods = 0;
  logic [7:0] sh;
  logic [7:0] cur [$];
  logic [7:0] got [$][$];
  bit   acked [$];

  always @(posedge clk) begin
    clk_n++;
    if (!rst_n) begin
      in_xfer = 0;
    end else if (prev_scl && sclk && prev_sda && !sda) begin          // START
      in_xfer = 1; nbits = 0; nbytes = 0; cur.delete();
    end else if (prev_scl && sclk && !prev_sda && sda) begin // STOP
      if (in_xfer) begin got.push_back(cur); acked.push_back(nbytes == 4 && !nack_next); end
      in_xfer = 0;
      nack_next = 0;
    end else if (in_xfer && !prev_scl && sclk) begin         // SCL rising
      if (rise_t >= 0) begin
        periods++;
        if (clk_n - rise_t != 4 * DIV) period_errs++;
      end
      rise_t = clk_n;
      if (nbits < 8) begin
        sh = {sh[6:0], sda};
        nbits++;
      end else begin
        nbits = 0;   // acknowledge clock
      end
    end else if (in_xfer && prev_scl && !sclk) begin         // SCL falling
      if (nbits == 8) begin
        cur.push_back(sh);
        nbytes++;
        // refuse the register byte of the first transfer only
        if (nbytes == 2 && !refused_once) begin refused_once = 1; nack_next = 1; slave_pull <= 0; end
        else slave_pull <= 1;
      end else slave_pull <= 0;
    end
    if (!in_xfer) rise_t = -1;
    prev_scl = sclk; prev_sda = sda;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!cfg_done) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (got.size() != 3) begin failures++; $display("FAIL %0d transfers", got.size()); end
    else begin
      checks++;
      if (got[0].size() != 2 || got[0][0] != 8'hBA || got[0][1] != 8'h09) begin
        failures++; $display("FAIL refused transfer not stopped after the register byte");
      end
      checks++;
      if (got[1].size() != 4 || got[1][0] != 8'hBA || got[1][1] != 8'h09 ||
          got[1][2] != exposure[15:8] || got[1][3] != exposure[7:0]) begin
        failures++; $display("FAIL exposure write");
      end
      checks++;
      if (got[2].size() != 4 || got[2][0] != 8'hBA || got[2][1] != 8'h35 ||
          got[2][2] != 8'h00 || got[2][3] != 8'h08) begin
        failures++; $display("FAIL gain write");
      end
    end
    checks++;
    if (period_errs != 0 || periods < 50) begin failures++; $display("FAIL SCLK period errors %0d of %0d", period_errs, periods); end
    checks++;
    if (sclk != 1 || sda_oe != 0) begin failures++; $display("FAIL bus not idle after configuration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
