// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Pulse start with the operands; done pulses NW clocks later with
// quotient = dividend / divisor (remainder discarded). A zero divisor gives
// an all-ones quotient. Used by the centroid unit to turn coordinate sums
// into mean positions.
module seq_divider #(
  parameter int unsigned NW = 31,
  parameter int unsigned DW = 19
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient
);

  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] num;
  logic [DW-1:0] den;
  logic [DW:0]   rem;
  logic [CW-1:0] cnt;
  logic [DW:0]   trial;

  assign trial = {rem[DW-1:0], num[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num      <= '0;
      den      <= '0;
      rem      <= '0;
      cnt      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        num  <= dividend;
        den  <= divisor;
        rem  <= '0;
        cnt  <= CW'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        if (trial >= {1'b0, den}) begin
          rem <= trial - {1'b0, den};
          num <= {num[NW-2:0], 1'b1};
        end else begin
          rem <= trial;
          num <= {num[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= (trial >= {1'b0, den}) ? {num[NW-2:0], 1'b1} : {num[NW-2:0], 1'b0};
        end
      end
    end
  end

endmodule
