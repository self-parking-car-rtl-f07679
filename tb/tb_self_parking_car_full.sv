// tb_self_parking_car_full: the same whole parking run at the design's own
// parameters: a 50 MHz clock, so about 100 million cycles.
module tb_self_parking_car_full;
  localparam int unsigned CLK_HZ = 50_000_000;
  logic clk = 0, rst, btn_start, adc_rd_n;
  logic [7:0] adc_data;
  logic [1:0] adc_sel;
  logic [3:0] motor_pwm, digit, led;
  logic [6:0] seg;

  always #5 clk = ~clk;

  self_parking_car dut (
    .clk(clk), .rst(rst), .btn_start(btn_start), .adc_data(adc_data), .adc_rd_n(adc_rd_n),
    .adc_sel(adc_sel), .motor_pwm(motor_pwm), .seg(seg), .digit(digit), .led(led));

  car_env #(.CLK_HZ(CLK_HZ)) env (
    .clk(clk), .rst(rst), .btn_start(btn_start), .adc_data(adc_data), .adc_rd_n(adc_rd_n),
    .adc_sel(adc_sel), .motor_pwm(motor_pwm), .seg(seg), .digit(digit), .led(led));
endmodule
