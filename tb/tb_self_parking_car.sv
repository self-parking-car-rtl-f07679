// tb_self_parking_car: a whole parking run of self_parking_car with the
// system clock scaled down to 1 MHz; every time constant of the design is
// given in microseconds and scales with it, so the run takes the same car
// time as on the 50 MHz board in 1/50 of the clock cycles.
module tb_self_parking_car;
  localparam int unsigned CLK_HZ = 1_000_000;
  logic clk = 0, rst, btn_start, adc_rd_n;
  logic [7:0] adc_data;
  logic [1:0] adc_sel;
  logic [3:0] motor_pwm, digit, led;
  logic [6:0] seg;

  always #5 clk = ~clk;

  self_parking_car #(.CLK_HZ(CLK_HZ)) dut (
    .clk(clk), .rst(rst), .btn_start(btn_start), .adc_data(adc_data), .adc_rd_n(adc_rd_n),
    .adc_sel(adc_sel), .motor_pwm(motor_pwm), .seg(seg), .digit(digit), .led(led));

  car_env #(.CLK_HZ(CLK_HZ)) env (
    .clk(clk), .rst(rst), .btn_start(btn_start), .adc_data(adc_data), .adc_rd_n(adc_rd_n),
    .adc_sel(adc_sel), .motor_pwm(motor_pwm), .seg(seg), .digit(digit), .led(led));
endmodule
