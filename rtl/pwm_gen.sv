// pwm_gen: pulse-width modulator for one wheel motor.
//
// The duty cycle is given in tenths, 0 to 10. Each PWM period is ten
// `tick`s long: the output is high for `duty` ticks and low for the other
// 10 - duty, so the motor sees duty/10 of the supply on average. The high
// and low phases are the two states of the original design's state
// machine; here they are a phase counter compared with the duty cycle,
// which is latched at the start of each period so that a period is never
// cut short. Values above 10 are treated as 10. With the default 5 kHz
// tick the PWM period is 2 ms.
//
// Interface: `pwm` is registered; a new `duty` takes effect at the next
// period boundary.
module pwm_gen
  import sp_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  tick,
  input  duty_t duty,
  output logic  pwm
);

  logic [3:0] phase;
  duty_t      duty_q;
  duty_t      duty_sat;

  assign duty_sat = (duty > duty_t'(DUTY_MAX)) ? duty_t'(DUTY_MAX) : duty;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= 4'(DUTY_MAX - 1);
      duty_q <= '0;
      pwm    <= 1'b0;
    end else if (tick) begin
      if (phase == 4'(DUTY_MAX - 1)) begin
        phase  <= '0;
        duty_q <= duty_sat;
        pwm    <= (duty_sat != '0);
      end else begin
        phase <= phase + 1'b1;
        pwm   <= (phase + 1'b1) < duty_q;
      end
    end
  end

endmodule
