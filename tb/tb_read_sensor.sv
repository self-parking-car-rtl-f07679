// tb_read_sensor: the sensing chain against the converter model. Steady
// inputs must come out exactly; reading_ready must pulse once per round of
// four conversions; a one-round spike must be filtered out; a step must
// arrive, whole, no sooner than the settling time.
module tb_read_sensor;
  import sp_pkg::*;
  localparam int TDIV = 3, PERIOD = 10, STABLE = 600;
  localparam int ROUND = TDIV * PERIOD;
  logic clk = 0, rst = 1, rd_n, ready;
  logic [1:0] sel;
  logic [7:0] data;
  sensor_bus_t analog, clean;
  int checks = 0, failures = 0;

  read_sensor #(.TICK_DIV(TDIV), .PERIOD(PERIOD), .WINDOW(8), .STABLE_CYCLES(STABLE)) dut (
    .clk(clk), .rst(rst), .adc_data(data), .adc_rd_n(rd_n), .adc_sel(sel),
    .clean(clean), .reading_ready(ready));

  adc0804_bank #(.CONV_CYCLES(5)) adcs (
    .clk(clk), .rd_n(rd_n), .sel(sel), .analog(analog), .data(data));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_ready = -1, ready_count = 0;
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (ready) begin
      if (last_ready >= 0)
        check(cyc - last_ready == ROUND, $sformatf("reading_ready period %0d", cyc - last_ready));
      last_ready = cyc;
      ready_count++;
    end
  end

  initial begin
    sensor_bus_t steady;
    int t0, lat;
    steady = '{8'hB0, 8'h65, 8'h65, 8'h20};   // back, side2, side1, front
    analog = steady;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (12 * ROUND + STABLE + 50) @(posedge clk);
    #1 check(clean == steady, $sformatf("steady: clean %h expected %h", clean, steady));

    // One-round spike on side sensor 1.
    @(posedge ready);
    analog[SENS_SIDE1] = 8'hFF;
    @(posedge ready);
    analog[SENS_SIDE1] = 8'h65;
    repeat (12 * ROUND + STABLE + 50) begin
      @(posedge clk); #1;
      check(clean[SENS_SIDE1] == 8'h65, $sformatf("spike passed: %h", clean[SENS_SIDE1]));
    end

    // Step on side sensor 2.
    analog[SENS_SIDE2] = 8'h30;
    t0 = cyc; lat = 0;
    while (clean[SENS_SIDE2] == 8'h65 && lat < 40 * ROUND + 4 * STABLE) begin
      @(posedge clk); #1; lat++;
    end
    check(clean[SENS_SIDE2] == 8'h30, $sformatf("step: clean %h, expected 30", clean[SENS_SIDE2]));
    check(lat > STABLE, $sformatf("step arrived after %0d cycles, settling time %0d", lat, STABLE));
    check(clean[SENS_FRONT] == 8'h20 && clean[SENS_SIDE1] == 8'h65 && clean[SENS_BACK] == 8'hB0,
          "other channels disturbed");
    check(ready_count > 20, "too few reading_ready pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
