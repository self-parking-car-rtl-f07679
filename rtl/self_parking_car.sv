// self_parking_car: FPGA controller of a model car that parallel parks itself.
//
// Four Sharp IR distance sensors (front, two on the right side, back) feed
// four ADC0804 converters on one shared 8-bit bus. read_sensor polls the
// converters, averages and settles each reading; park_fsm turns the clean
// readings into one duty cycle per wheel; four pwm_gen channels drive the
// L293 motor driver. The back wheels can only drive the car forward and the
// front wheels only in reverse, so steering is done by running the left and
// right wheels at different speeds. The 7-segment display shows the high
// nibble of each clean reading and the LEDs show the parking step.
//
// One clock (50 MHz) runs everything; the slower rates of the original
// board (300 kHz ADC stepping, 5 kHz PWM and display scan) are clock
// enables here. All times are given in microseconds and converted with
// CLK_HZ, so lowering CLK_HZ scales the whole design for simulation.
//
// Reset: `rst` is a power-on reset. The debounced start/reset button also
// resets everything while held; when it is released the controller waits
// one second and begins the parking procedure.
//
// Pins: `adc_rd_n` is the single RD line and `adc_sel` the converter select
// for the external RD multiplexer; `motor_pwm` is {back left, back right,
// front left, front right}; `seg`/`digit` are active low; `led` shows the
// park_fsm state number.
module self_parking_car
  import sp_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned ADC_TICK_HZ = 300_000,
  parameter int unsigned ADC_PERIOD  = 100,       // ADC ticks per round of four
  parameter int unsigned AVG_WINDOW  = 8,
  parameter int unsigned PWM_TICK_HZ = 5_000,
  parameter int unsigned SCAN_HZ     = 5_000,     // display digit rate
  parameter int unsigned DEBOUNCE_US = 10_000,
  parameter int unsigned STABLE_US   = 40_000,
  parameter int unsigned STARTUP_US  = 1_000_000,
  parameter int unsigned BACKUP_US   = 100_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       btn_start,
  input  logic [7:0] adc_data,
  output logic       adc_rd_n,
  output logic [1:0] adc_sel,
  output logic [3:0] motor_pwm,
  output logic [6:0] seg,
  output logic [3:0] digit,
  output logic [3:0] led
);

  function automatic int unsigned us_to_cycles(int unsigned us);
    return int'((longint'(CLK_HZ) * longint'(us)) / 64'd1_000_000);
  endfunction

  localparam int unsigned ADC_DIV   = CLK_HZ / ADC_TICK_HZ;
  localparam int unsigned PWM_DIV   = CLK_HZ / PWM_TICK_HZ;
  localparam int unsigned SCAN_DIV  = CLK_HZ / SCAN_HZ;
  localparam int unsigned DEB_CYC   = us_to_cycles(DEBOUNCE_US);
  localparam int unsigned STAB_CYC  = us_to_cycles(STABLE_US);
  localparam int unsigned START_CYC = us_to_cycles(STARTUP_US);
  localparam int unsigned BACK_CYC  = us_to_cycles(BACKUP_US);

  logic        btn_clean;
  logic        sys_rst;
  sensor_bus_t clean;
  logic        reading_ready;
  wheel_duty_t duty;
  park_state_e state;
  logic        pwm_tick;
  logic        scan_tick;

  debouncer #(.STABLE_CYCLES(DEB_CYC)) u_btn (
    .clk  (clk),
    .rst  (rst),
    .noisy(btn_start),
    .clean(btn_clean)
  );

  assign sys_rst = rst | btn_clean;

  read_sensor #(
    .TICK_DIV     (ADC_DIV),
    .PERIOD       (ADC_PERIOD),
    .WINDOW       (AVG_WINDOW),
    .STABLE_CYCLES(STAB_CYC)
  ) u_sense (
    .clk          (clk),
    .rst          (sys_rst),
    .adc_data     (adc_data),
    .adc_rd_n     (adc_rd_n),
    .adc_sel      (adc_sel),
    .clean        (clean),
    .reading_ready(reading_ready)
  );

  park_fsm #(
    .STARTUP_CYCLES(START_CYC),
    .BACKUP_CYCLES (BACK_CYC)
  ) u_fsm (
    .clk          (clk),
    .rst          (sys_rst),
    .reading_ready(reading_ready),
    .clean        (clean),
    .duty         (duty),
    .state        (state)
  );

  tick_gen #(.DIV(PWM_DIV)) u_pwm_tick (
    .clk (clk),
    .rst (sys_rst),
    .tick(pwm_tick)
  );

  pwm_gen u_pwm_bl (.clk(clk), .rst(sys_rst), .tick(pwm_tick), .duty(duty.bl), .pwm(motor_pwm[3]));
  pwm_gen u_pwm_br (.clk(clk), .rst(sys_rst), .tick(pwm_tick), .duty(duty.br), .pwm(motor_pwm[2]));
  pwm_gen u_pwm_fl (.clk(clk), .rst(sys_rst), .tick(pwm_tick), .duty(duty.fl), .pwm(motor_pwm[1]));
  pwm_gen u_pwm_fr (.clk(clk), .rst(sys_rst), .tick(pwm_tick), .duty(duty.fr), .pwm(motor_pwm[0]));

  tick_gen #(.DIV(SCAN_DIV)) u_scan_tick (
    .clk (clk),
    .rst (rst),
    .tick(scan_tick)
  );

  seg7_display u_disp (
    .clk   (clk),
    .rst   (rst),
    .tick  (scan_tick),
    .values(clean),
    .seg   (seg),
    .digit (digit)
  );

  assign led = state;

endmodule
