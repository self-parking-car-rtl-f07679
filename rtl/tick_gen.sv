// tick_gen: clock divider producing a one-cycle enable strobe.
//
// The original board derived slow clocks (300 kHz for the ADC sequencer,
// 5 kHz for the motor PWM and the display scan) from the 50 MHz oscillator
// with a counter. Here the same counter produces a clock-enable strobe
// instead of a new clock, so that the whole design stays in one clock
// domain; this is this implementation's choice.
//
// Interface: `tick` is high for one `clk` cycle every DIV cycles. The first
// strobe comes DIV cycles after reset is released.
module tick_gen #(
  parameter int unsigned DIV = 10_000   // 50 MHz / 10 000 = 5 kHz
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;
  logic [W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == W'(DIV - 1)) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end

endmodule
