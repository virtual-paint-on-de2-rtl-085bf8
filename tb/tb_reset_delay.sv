// tb_reset_delay: checks that the stretched reset stays low for exactly
// DELAY+1 clock edges after the key is released, then stays high, and drops
// at once when the key is pressed again.
module tb_reset_delay;
  localparam int DELAY = 20;
  logic clk = 0, rst_n_i = 0, rst_n_o;
  int checks = 0, failures = 0;

  reset_delay #(.DELAY(DELAY)) dut (.clk, .rst_n_i, .rst_n_o);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_high;
    repeat (3) @(posedge clk);
    #1 check(rst_n_o == 0, "low while key held");
    rst_n_i = 1;
    first_high = -1;
    for (int i = 1; i <= DELAY + 5; i++) begin
      @(posedge clk); #1;
      if (rst_n_o && first_high < 0) first_high = i;
      if (i <= DELAY) check(rst_n_o == 0, $sformatf("still low at edge %0d", i));
    end
    check(first_high == DELAY + 1, $sformatf("released at edge %0d", first_high));
    repeat (10) begin @(posedge clk); #1 check(rst_n_o == 1, "stays high"); end
    #2 rst_n_i = 0; #1;
    check(rst_n_o == 0, "asynchronous re-assert");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
