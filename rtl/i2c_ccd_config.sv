// i2c_ccd_config: writes the camera sensor's registers over I2C after reset.
//
// The sensor is set up through a two-wire serial bus (SCLK, SDAT). After
// reset this block walks a short register table and sends each entry as one
// I2C write: START, device address (write), register address, data high
// byte, data low byte, STOP, with the sensor acknowledging every byte. The
// exposure (shutter width) entry takes its value from the board's toggle
// switches, sampled when the table is sent; a new exposure needs a reset, as
// in the design. If a byte is not acknowledged the transfer is ended with a
// STOP and the same entry is sent again. cfg_done rises after the last entry.
// The bus is open-drain: sda_oe = 1 pulls SDAT low, sda_oe = 0 releases it
// and sda_in is the line as seen on the pin; SCLK is driven push-pull.
// Each bit takes four ticks of CLK_DIV clocks (100 kHz SCLK with a 50 MHz
// clock at the default). That an I2C block configures the sensor, and that
// the switches set exposure, are the design's; the register table (device
// address 0xBA, shutter width register 0x09, global gain register 0x35)
// comes from the sensor's usual register map and is this implementation's
// choice, as is the retry on a missing acknowledge.
module i2c_ccd_config #(
  parameter int unsigned CLK_DIV  = 125,
  parameter logic [7:0]  DEV_ADDR = 8'hBA,
  parameter logic [15:0] GAIN     = 16'h0008
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] exposure,
  output logic        sclk,
  output logic        sda_oe,
  input  logic        sda_in,
  output logic        cfg_done
);

  localparam int unsigned N_REGS = 2;
  localparam int unsigned DW     = $clog2(CLK_DIV);

  typedef enum logic [2:0] {S_IDLE, S_START, S_BITS, S_STOP, S_NEXT, S_DONE} state_e;

  state_e      state;
  logic [DW-1:0] div;
  logic          tick;
  logic [1:0]  q;          // quarter of the current bit
  logic [1:0]  byte_i;
  logic [3:0]  bit_i;      // 0..7 data, 8 acknowledge
  logic [31:0] frame;
  logic        nack;
  logic [$clog2(N_REGS+1)-1:0] entry;

  function automatic logic [23:0] table_entry(int unsigned i, logic [15:0] exp_v);
    case (i)
      0:       table_entry = {8'h09, exp_v};   // shutter width (exposure)
      default: table_entry = {8'h35, GAIN};    // global gain
    endcase
  endfunction

  assign tick = (div == DW'(CLK_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= tick ? '0 : div + 1'b1;
  end

  wire [7:0] cur_byte = frame[31 - 8*byte_i -: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      q        <= '0;
      byte_i   <= '0;
      bit_i    <= '0;
      frame    <= '0;
      nack     <= 1'b0;
      entry    <= '0;
      sclk     <= 1'b1;
      sda_oe   <= 1'b0;
      cfg_done <= 1'b0;
    end else if (tick) begin
      q <= q + 1'b1;
      unique case (state)
        S_IDLE: begin
          frame <= {DEV_ADDR, table_entry(32'(entry), exposure)};
          q     <= '0;
          state <= S_START;
        end
        S_START: begin
          // SDA falls while SCLK is high, then SCLK falls
          unique case (q)
            2'd0: begin sclk <= 1'b1; sda_oe <= 1'b0; end
            2'd1: sda_oe <= 1'b1;
            2'd2: sclk <= 1'b0;
            default: begin
              byte_i <= '0;
              bit_i  <= '0;
              nack   <= 1'b0;
              state  <= S_BITS;
            end
          endcase
        end
        S_BITS: begin
          unique case (q)
            2'd0: begin
              sclk   <= 1'b0;
              sda_oe <= (bit_i == 4'd8) ? 1'b0 : !cur_byte[7 - bit_i[2:0]];
            end
            2'd1: sclk <= 1'b1;
            2'd2: if (bit_i == 4'd8) nack <= sda_in;
            default: begin
              sclk <= 1'b0;
              if (bit_i == 4'd8) begin
                bit_i <= '0;
                if (nack || byte_i == 2'd3) state <= S_STOP;
                else                        byte_i <= byte_i + 1'b1;
              end else begin
                bit_i <= bit_i + 1'b1;
              end
            end
          endcase
        end
        S_STOP: begin
          // SDA rises while SCLK is high
          unique case (q)
            2'd0: begin sclk <= 1'b0; sda_oe <= 1'b1; end
            2'd1: sclk <= 1'b1;
            2'd2: sda_oe <= 1'b0;
            default: state <= S_NEXT;
          endcase
        end
        S_NEXT: begin
          q <= '0;
          if (!nack) entry <= entry + 1'b1;
          state <= (!nack && entry == ($bits(entry))'(N_REGS - 1)) ? S_DONE : S_IDLE;
        end
        default: begin
          cfg_done <= 1'b1;
          q        <= '0;
        end
      endcase
    end
  end

endmodule
