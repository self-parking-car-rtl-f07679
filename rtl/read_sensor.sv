// read_sensor: the sensing block, from the four ADC0804s to clean readings.
//
// A clock divider makes the 300 kHz step rate of the ADC sequencer, which
// reads the four converters one after another over their shared bus. Each
// round of four unfiltered readings (`dirty_rr`) is pushed through a
// window-8 moving average per sensor, and each average must then stay
// steady for 0.04 s before it is passed on. This chain follows the
// original design; the averages are updated together, and
// `reading_ready` pulses once per round when the new averages are out.
//
// Interface: `clean[i]` is the filtered reading of sensor i (see sp_pkg
// for the numbering). At the defaults a round takes PERIOD / 300 kHz =
// 333 us, and a step in the input reaches `clean` after the averaging
// window has filled (8 rounds) plus the 0.04 s settling time.
module read_sensor
  import sp_pkg::*;
#(
  parameter int unsigned TICK_DIV      = 167,        // 50 MHz / 167 = 299 kHz
  parameter int unsigned PERIOD        = 100,
  parameter int unsigned WINDOW        = 8,
  parameter int unsigned STABLE_CYCLES = 2_000_000   // 0.04 s at 50 MHz
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  adc_data,
  output logic        adc_rd_n,
  output logic [1:0]  adc_sel,
  output sensor_bus_t clean,
  output logic        reading_ready
);

  logic        tick;
  sensor_bus_t raw;
  sensor_bus_t avg;
  logic        dirty_rr;
  logic [NUM_SENSORS-1:0] avg_valid;

  tick_gen #(.DIV(TICK_DIV)) u_tick (
    .clk (clk),
    .rst (rst),
    .tick(tick)
  );

  adc_sequencer #(.PERIOD(PERIOD)) u_seq (
    .clk     (clk),
    .rst     (rst),
    .tick    (tick),
    .adc_data(adc_data),
    .adc_rd_n(adc_rd_n),
    .adc_sel (adc_sel),
    .raw     (raw),
    .dirty_rr(dirty_rr)
  );

  for (genvar i = 0; i < NUM_SENSORS; i++) begin : g_chan
    rolling_average #(.WINDOW(WINDOW), .WIDTH(8)) u_avg (
      .clk      (clk),
      .rst      (rst),
      .in_valid (dirty_rr),
      .in_data  (raw[i]),
      .out_data (avg[i]),
      .out_valid(avg_valid[i])
    );

    stability_filter #(.STABLE_CYCLES(STABLE_CYCLES), .WIDTH(8)) u_stable (
      .clk     (clk),
      .rst     (rst),
      .in_data (avg[i]),
      .out_data(clean[i])
    );
  end

  assign reading_ready = &avg_valid;

endmodule
