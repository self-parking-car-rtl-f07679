// tb_park_fsm: walks the controller through a whole parking run by setting
// the four clean readings by hand, checking after each change the state
// and the four wheel duty cycles, the length of the start-up wait and of
// the back-up hold, the turn-in target, and the cases that must NOT move
// the controller on (a gap too short, a back reading that is not yet far
// for long enough, sides not yet parallel).
module tb_park_fsm;
  import sp_pkg::*;
  localparam int STARTUP = 50, BACKUP = 20;
  logic clk = 0, rst = 1, ready = 0;
  sensor_bus_t clean;
  wheel_duty_t duty;
  park_state_e state;
  int checks = 0, failures = 0;

  park_fsm #(.STARTUP_CYCLES(STARTUP), .BACKUP_CYCLES(BACKUP)) dut (
    .clk(clk), .rst(rst), .reading_ready(ready), .clean(clean),
    .duty(duty), .state(state));

  always #5 clk = ~clk;
  // Sensor rounds arrive every 7 cycles.
  int rc = 0;
  always_ff @(posedge clk) begin
    rc    <= (rc == 6) ? 0 : rc + 1;
    ready <= (rc == 6);
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s (state %0d duty %h)", $time, msg, state, duty); end
  endtask

  task automatic set(reading_t f, reading_t s1, reading_t s2, reading_t b);
    clean[SENS_FRONT] = f; clean[SENS_SIDE1] = s1; clean[SENS_SIDE2] = s2; clean[SENS_BACK] = b;
  endtask

  function automatic wheel_duty_t wd(int bl, int br, int fl, int fr);
    return '{bl: duty_t'(bl), br: duty_t'(br), fl: duty_t'(fl), fr: duty_t'(fr)};
  endfunction

  // Let n clock edges pass, then expect this state and duty.
  task automatic expect_after(int n, park_state_e st, wheel_duty_t d, string what);
    repeat (n) @(posedge clk);
    #1;
    check(state == st, $sformatf("%s: state %0d, expected %0d", what, state, st));
    check(duty == d, $sformatf("%s: duty %h, expected %h", what, duty, d));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    set(8'h20, 8'h30, 8'h30, 8'h20);
    repeat (3) @(posedge clk);
    rst <= 0;
    // Start-up wait: one second in the real design.
    n = 0;
    do begin @(posedge clk); #1; n++; end while (state == ST_WAIT && n < 10 * STARTUP);
    check(state == ST_PRESTART1, "never left WAIT");
    check(n == STARTUP, $sformatf("start-up wait %0d cycles, expected %0d", n, STARTUP));
    expect_after(1, ST_PRESTART1, wd(7, 7, 0, 0), "prestart1 forward");
    expect_after(10, ST_PRESTART1, wd(7, 7, 0, 0), "prestart1 not near yet");
    set(8'h20, 8'h60, 8'h30, 8'h20);
    expect_after(2, ST_PRESTART2, wd(1, 10, 0, 0), "prestart2 turning left");
    expect_after(10, ST_PRESTART2, wd(1, 10, 0, 0), "prestart2 not parallel");
    set(8'h20, 8'h60, 8'h5F, 8'h20);
    expect_after(5, ST_PRESTART2, wd(1, 10, 0, 0), "prestart2 nearly parallel");
    set(8'h20, 8'h60, 8'h60, 8'h20);
    expect_after(2, ST_START, wd(7, 7, 0, 0), "start");
    set(8'h20, 8'h30, 8'h60, 8'h20);        // front side sees a gap, back side still a car
    expect_after(10, ST_START, wd(7, 7, 0, 0), "gap too short");
    set(8'h20, 8'h60, 8'h60, 8'h20);
    expect_after(5, ST_START, wd(7, 7, 0, 0), "beside a car");
    set(8'h20, 8'h30, 8'h30, 8'h20);        // whole car beside the gap
    expect_after(2, ST_MIDDLE, wd(7, 7, 0, 0), "middle");
    set(8'h20, 8'h70, 8'h30, 8'h20);
    expect_after(10, ST_MIDDLE, wd(7, 7, 0, 0), "front side reached the next car");
    set(8'h20, 8'h70, 8'h70, 8'h20);
    expect_after(2, ST_BACKUP, wd(0, 0, 10, 10), "backup");
    // Back reading far for less than the hold time, then interrupted.
    set(8'h20, 8'h70, 8'h70, 8'h20);
    expect_after(BACKUP - 5, ST_BACKUP, wd(0, 0, 10, 10), "backup short far");
    set(8'h20, 8'h70, 8'h70, 8'h70);
    expect_after(3, ST_BACKUP, wd(0, 0, 10, 10), "backup not far");
    set(8'h20, 8'h70, 8'h70, 8'h20);
    n = 0;
    do begin @(posedge clk); #1; n++; end while (state == ST_BACKUP && n < 10 * BACKUP);
    check(state == ST_TURNIN, "never left BACKUP");
    check(n == BACKUP, $sformatf("back-up hold %0d cycles, expected %0d", n, BACKUP));
    check(dut.target == 8'h54, $sformatf("turn-in target %h, expected 54", dut.target));
    expect_after(1, ST_TURNIN, wd(0, 1, 10, 2), "turn in");
    set(8'h20, 8'h55, 8'h70, 8'h20);
    expect_after(5, ST_TURNIN, wd(0, 1, 10, 2), "turn in above target");
    set(8'h20, 8'h54, 8'h70, 8'h20);
    expect_after(1, ST_BACKIN, wd(0, 0, 0, 0), "reach target");
    expect_after(1, ST_BACKIN, wd(0, 0, 2, 10), "back in");
    set(8'h20, 8'h54, 8'h70, 8'h5F);
    expect_after(5, ST_BACKIN, wd(0, 0, 2, 10), "back in not close");
    set(8'h20, 8'h54, 8'h70, 8'h60);
    expect_after(1, ST_STRAIGHT, wd(0, 0, 0, 0), "back close");
    set(8'h20, 8'h80, 8'h50, 8'h60);
    expect_after(2, ST_STRAIGHT, wd(1, 10, 1, 0), "wiggle, nose in");
    set(8'h20, 8'h50, 8'h80, 8'h60);
    expect_after(2, ST_STRAIGHT, wd(10, 1, 0, 1), "wiggle, tail in");
    set(8'h20, 8'h60, 8'h65, 8'h60);
    expect_after(2, ST_STRAIGHT, wd(10, 1, 0, 1), "not yet parallel");
    set(8'h20, 8'h61, 8'h65, 8'h60);
    expect_after(1, ST_END, wd(0, 0, 0, 0), "parallel");
    expect_after(1, ST_END, wd(7, 7, 0, 0), "end, creep forward");
    set(8'h9F, 8'h61, 8'h65, 8'h60);
    expect_after(3, ST_END, wd(7, 7, 0, 0), "end, front medium");
    set(8'hA0, 8'h61, 8'h65, 8'h60);
    expect_after(2, ST_END, wd(0, 0, 0, 0), "parked");
    expect_after(50, ST_END, wd(0, 0, 0, 0), "stays parked");
    // Reset returns to the wait state.
    rst <= 1;
    expect_after(2, ST_WAIT, wd(0, 0, 0, 0), "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
