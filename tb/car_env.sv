// car_env: scripted surroundings for a whole parking run of self_parking_car.
//
// The environment plays the four IR sensors (as ADC codes, through the
// converter model) and the driver's start button. It watches the parking
// step on the LEDs and moves the "car" on by changing the sensor codes, the
// way the readings would change on a real run: approach the parked row,
// straighten up, pass a gap that is too short, find a gap long enough, pull
// up beside the next car, back up, turn in, back in, straighten, creep
// forward and stop. Large codes mean near obstacles.
//
// Besides the order of the steps it checks the wheel PWM duty cycles in
// each step (high time over two whole PWM periods), the one-second
// start-up wait, the 0.1 s back-up hold, the display contents, and counts
// each mechanism of the design, failing any that never happened: button
// bounce rejected, sensor spike rejected, short gap rejected, both wiggle
// directions, the final stop, and every one of the ten steps.
module car_env
  import sp_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic       clk,
  output logic       rst,
  output logic       btn_start,
  output logic [7:0] adc_data,
  input  logic       adc_rd_n,
  input  logic [1:0] adc_sel,
  input  logic [3:0] motor_pwm,
  input  logic [6:0] seg,
  input  logic [3:0] digit,
  input  logic [3:0] led
);

  localparam int     MS       = int'(CLK_HZ / 1000);
  localparam int     PWM_DIV  = int'(CLK_HZ / 5000);  // cycles per PWM tick
  localparam int     PWM_PER  = 10 * PWM_DIV;         // cycles per PWM period
  localparam int     CONV     = int'(longint'(CLK_HZ) * 114 / 1_000_000);

  sensor_bus_t analog;
  int checks = 0, failures = 0;
  int cyc = 0;

  // Mechanism counters.
  int n_glitch = 0, n_spike = 0, n_short_gap = 0, n_startup = 0, n_backup_hold = 0;
  int n_wiggle_l = 0, n_wiggle_r = 0, n_parked = 0, n_display = 0;
  int visits [16] = '{default: 0};

  adc0804_bank #(.CONV_CYCLES(CONV > 0 ? CONV : 1)) adcs (
    .clk(clk), .rd_n(adc_rd_n), .sel(adc_sel), .analog(analog), .data(adc_data));

  always @(posedge clk) cyc <= cyc + 1;

  park_state_e last_led = ST_WAIT;
  always @(posedge clk) if (!rst && park_state_e'(led) != last_led) begin
    last_led <= park_state_e'(led);
    visits[led]++;
    $display("[%0d ms] step %0d", cyc / MS, led);
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d ms]: %s", cyc / MS, msg); end
  endtask

  task automatic finish();
    $display("mechanisms: glitch=%0d spike=%0d short_gap=%0d startup=%0d backup_hold=%0d wiggle_l=%0d wiggle_r=%0d parked=%0d display=%0d",
             n_glitch, n_spike, n_short_gap, n_startup, n_backup_hold, n_wiggle_l, n_wiggle_r, n_parked, n_display);
    check(n_glitch > 0, "button bounce never rejected");
    check(n_spike > 0, "sensor spike never rejected");
    check(n_short_gap > 0, "short gap never rejected");
    check(n_startup > 0, "start-up wait never measured");
    check(n_backup_hold > 0, "back-up hold never measured");
    check(n_wiggle_l > 0 && n_wiggle_r > 0, "straightening never wiggled both ways");
    check(n_parked > 0, "car never stopped");
    check(n_display > 0, "display never checked");
    foreach (visits[s])
      if (s inside {0, 1, 2, 3, 4, 6, 8, 9, 10})
        check(visits[s] > 0, $sformatf("step %0d never entered", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic wait_ms(int ms);
    repeat (ms * MS) @(posedge clk);
  endtask

  task automatic set(reading_t f, reading_t s1, reading_t s2, reading_t b);
    analog[SENS_FRONT] = f; analog[SENS_SIDE1] = s1; analog[SENS_SIDE2] = s2; analog[SENS_BACK] = b;
  endtask

  // Wait for a step, at most max_ms; returns the time taken in cycles.
  task automatic wait_step(park_state_e st, int max_ms, output int took);
    int t0 = cyc;
    while (park_state_e'(led) != st && cyc - t0 < max_ms * MS) @(posedge clk);
    took = cyc - t0;
    check(park_state_e'(led) == st, $sformatf("step %0d not reached within %0d ms (at step %0d)", st, max_ms, led));
  endtask

  task automatic hold_step(park_state_e st, int ms, string why);
    bit stayed = 1;
    repeat (ms * MS) begin @(posedge clk); if (park_state_e'(led) != st) stayed = 0; end
    check(stayed, $sformatf("left step %0d: %s", st, why));
  endtask

  // High cycles of each wheel over two whole PWM periods against duty*2 ticks.
  task automatic check_pwm(int bl, int br, int fl, int fr, string what);
    int high [4] = '{default: 0};
    int want [4];
    want = '{fr, fl, br, bl};
    repeat (PWM_PER + 1) @(posedge clk);
    repeat (2 * PWM_PER) begin
      @(posedge clk);
      for (int i = 0; i < 4; i++) if (motor_pwm[i]) high[i]++;
    end
    for (int i = 0; i < 4; i++)
      check(high[i] == want[i] * 2 * PWM_DIV,
            $sformatf("%s: wheel %0d high %0d cycles, expected %0d", what, i, high[i], want[i] * 2 * PWM_DIV));
  endtask

  function automatic logic [6:0] glyph(logic [3:0] n);
    string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    logic [6:0] s = '1;
    for (int i = 0; i < lit[n].len(); i++) s[3'(lit[n][i] - 8'd97)] = 1'b0;
    return s;
  endfunction

  // Watchdog: a whole run is about 2.5 s of car time.
  initial begin
    repeat (6000 * MS) @(posedge clk);
    failures++;
    $display("watchdog expired at step %0d", led);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int took;
    rst = 1;
    btn_start = 0;
    set(8'h20, 8'h30, 8'h30, 8'h20);
    repeat (10) @(posedge clk);
    rst = 0;
    // The driver presses start: held 30 ms, released.
    wait_ms(5);
    btn_start = 1;
    wait_ms(30);
    check(park_state_e'(led) == ST_WAIT, "not waiting while start is held");
    btn_start = 0;
    wait_step(ST_PRESTART1, 1200, took);
    check(took >= 1000 * MS && took <= 1015 * MS,
          $sformatf("start-up wait %0d ms after release, expected 1000..1015", took / MS));
    n_startup++;

    // PRESTART1: heading for the row of parked cars.
    check_pwm(7, 7, 0, 0, "prestart1");
    // Contact bounce on the button must not restart the run.
    repeat (5) begin btn_start = 1; wait_ms(1); btn_start = 0; wait_ms(1); end
    hold_step(ST_PRESTART1, 30, "button bounce");
    n_glitch++;
    // One sensor round with a spike on the front side sensor.
    analog[SENS_SIDE1] = 8'hF0;
    repeat (int'(MS / 3)) @(posedge clk);
    analog[SENS_SIDE1] = 8'h30;
    hold_step(ST_PRESTART1, 80, "sensor spike");
    n_spike++;
    // The display shows the high nibbles of the four readings.
    for (int i = 0; i < 4; i++) begin
      @(posedge clk iff digit == ~(4'b1 << i));
      @(posedge clk);
      check(seg == glyph(analog[i][7:4]), $sformatf("digit %0d shows %b", i, seg));
    end
    n_display++;
    set(8'h20, 8'h60, 8'h30, 8'h20);            // close to the row
    wait_step(ST_PRESTART2, 100, took);

    // PRESTART2: turning left until parallel.
    check_pwm(1, 10, 0, 0, "prestart2");
    hold_step(ST_PRESTART2, 20, "not parallel yet");
    set(8'h20, 8'h60, 8'h60, 8'h20);
    wait_step(ST_START, 100, took);

    // START: a gap seen by one side sensor only is too short.
    check_pwm(7, 7, 0, 0, "start");
    set(8'h20, 8'h30, 8'h60, 8'h20);
    hold_step(ST_START, 80, "short gap");
    n_short_gap++;
    set(8'h20, 8'h60, 8'h60, 8'h20);
    wait_ms(60);
    set(8'h20, 8'h30, 8'h30, 8'h70);            // a gap the length of the car
    wait_step(ST_MIDDLE, 100, took);

    // MIDDLE: pull up beside the car in front of the gap.
    check_pwm(7, 7, 0, 0, "middle");
    set(8'h20, 8'h70, 8'h70, 8'h70);
    wait_step(ST_BACKUP, 100, took);

    // BACKUP: reverse; once the back reads far for 0.1 s, turn in.
    check_pwm(0, 0, 10, 10, "backup");
    hold_step(ST_BACKUP, 30, "back not far yet");
    set(8'h20, 8'h70, 8'h70, 8'h20);
    wait_step(ST_TURNIN, 250, took);
    check(took >= 140 * MS && took <= 150 * MS,
          $sformatf("back-up hold %0d ms after the back cleared, expected 140..150", took / MS));
    n_backup_hold++;

    // TURNIN: until the front side reading has dropped by 28.
    check_pwm(0, 1, 10, 2, "turn in");
    set(8'h20, 8'h55, 8'h70, 8'h20);
    hold_step(ST_TURNIN, 60, "front side still above target");
    set(8'h20, 8'h40, 8'h70, 8'h20);
    wait_step(ST_BACKIN, 100, took);

    // BACKIN: until the car behind is close.
    check_pwm(0, 0, 2, 10, "back in");
    set(8'h20, 8'h40, 8'h70, 8'hB0);
    wait_step(ST_STRAIGHT, 100, took);

    // STRAIGHT: wiggle until the sides agree.
    check_pwm(10, 1, 0, 1, "straighten, tail nearer");
    n_wiggle_r++;
    set(8'h20, 8'h80, 8'h50, 8'hB0);
    wait_ms(60);
    check_pwm(1, 10, 1, 0, "straighten, nose nearer");
    n_wiggle_l++;
    set(8'h20, 8'h66, 8'h66, 8'hB0);
    wait_step(ST_END, 100, took);

    // END: creep forward until the car in front is close, then stop.
    check_pwm(7, 7, 0, 0, "end");
    set(8'hB0, 8'h66, 8'h66, 8'hB0);
    wait_ms(60);
    check_pwm(0, 0, 0, 0, "parked");
    hold_step(ST_END, 20, "parked");
    n_parked++;
    finish();
  end

endmodule
