// adc_sequencer: reads four ADC0804 converters that share one 8-bit bus.
//
// The four converters are wired in the ADC0804's read-only mode (RD tied to
// WR, CS grounded), so a low pulse on a converter's RD both puts its last
// result on the shared bus and, on the rising edge, starts the next
// conversion. An external 2-to-4 multiplexer routes the single `adc_rd_n`
// line to the converter chosen by `adc_sel`, which saves FPGA pins.
//
// On every `tick` (300 kHz) a counter steps through 0..PERIOD-1. While it
// is at 0, 1, 2 and 3, RD is low and converter 0, 1, 2, 3 is selected; the
// rest of the PERIOD ticks (about 320 us at PERIOD = 100) leave the
// converters time to finish, against the 114 us conversion time of an
// ADC0804 clocked at 600 kHz. All of this follows the original design.
// The bus is sampled on the tick that ends each RD-low slot, and `dirty_rr`
// (unfiltered readings ready) pulses for one cycle once channel 3 has been
// stored; those two timing details are this implementation's choice.
//
// Interface: `raw[i]` holds the last reading of converter i. One full
// round takes PERIOD ticks.
module adc_sequencer
  import sp_pkg::*;
#(
  parameter int unsigned PERIOD = 100
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic [7:0]  adc_data,
  output logic        adc_rd_n,
  output logic [1:0]  adc_sel,
  output sensor_bus_t raw,
  output logic        dirty_rr
);

  localparam int unsigned W = $clog2(PERIOD);
  logic [W-1:0] count;
  logic [W-1:0] count_next;

  assign count_next = (count == W'(PERIOD - 1)) ? '0 : count + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= W'(PERIOD - 1);
      adc_rd_n <= 1'b1;
      adc_sel  <= 2'd0;
      raw      <= '0;
      dirty_rr <= 1'b0;
    end else begin
      dirty_rr <= 1'b0;
      if (tick) begin
        // End of an RD-low slot: the selected converter drives the bus.
        if (!adc_rd_n) begin
          raw[adc_sel] <= adc_data;
          if (adc_sel == 2'd3) dirty_rr <= 1'b1;
        end
        count <= count_next;
        if (count_next < W'(NUM_SENSORS)) begin
          adc_rd_n <= 1'b0;
          adc_sel  <= count_next[1:0];
        end else begin
          adc_rd_n <= 1'b1;
        end
      end
    end
  end

  initial assert (PERIOD > NUM_SENSORS)
    else $error("adc_sequencer: PERIOD must exceed the number of converters");

endmodule
