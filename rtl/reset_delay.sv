// reset_delay: stretches the board reset so the clocked logic and the camera
// start from a settled state.
//
// After the asynchronous active-low reset input is released, a counter runs
// for DELAY clocks; only then does rst_n_o go high. The output is released
// synchronously to clk, so every flip-flop fed by it leaves reset on the same
// edge. The design only names a reset-delay stage; the single output and the
// default length (about 20 ms at 50 MHz) are this implementation's choice.
module reset_delay #(
  parameter int unsigned DELAY = 1_000_000
) (
  input  logic clk,
  input  logic rst_n_i,
  output logic rst_n_o
);

  localparam int unsigned CW = $clog2(DELAY + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n_i) begin
    if (!rst_n_i) begin
      cnt     <= '0;
      rst_n_o <= 1'b0;
    end else if (cnt != CW'(DELAY)) begin
      cnt     <= cnt + 1'b1;
      rst_n_o <= 1'b0;
    end else begin
      rst_n_o <= 1'b1;
    end
  end

endmodule
