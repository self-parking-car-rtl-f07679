// adc0804_bank: behavioural model (testbench only) of the four ADC0804
// converters, their shared data bus and the external RD multiplexer.
//
// Each converter is wired in read-only mode: CS is grounded and RD is tied
// to WR. The multiplexer gives converter i the RD line while `sel` == i and
// holds the other RDs high. While a converter's RD is low it drives its last
// result onto the bus; the rising edge of RD starts a new conversion, which
// after CONV_CYCLES clock cycles stores the converter's current analog
// input (`analog[i]`, already as an 8-bit code). With no converter reading,
// the FPGA pins' pull-ups make the bus read 0xFF. Results start at 0.
module adc0804_bank
  import sp_pkg::*;
#(
  parameter int unsigned CONV_CYCLES = 8
) (
  input  logic        clk,
  input  logic        rd_n,
  input  logic [1:0]  sel,
  input  sensor_bus_t analog,
  output logic [7:0]  data
);

  logic [3:0]  rd_n_chip;
  logic [3:0]  rd_n_prev = 4'hF;
  sensor_bus_t result    = '0;
  int unsigned busy [4]  = '{default: 0};

  always_comb begin
    for (int i = 0; i < 4; i++) rd_n_chip[i] = (sel == 2'(i)) ? rd_n : 1'b1;
    data = 8'hFF;
    for (int i = 0; i < 4; i++) if (!rd_n_chip[i]) data = result[i];
  end

  always_ff @(posedge clk) begin
    rd_n_prev <= rd_n_chip;
    for (int i = 0; i < 4; i++) begin
      if (rd_n_chip[i] && !rd_n_prev[i]) begin
        busy[i] <= CONV_CYCLES;
      end else if (busy[i] == 1) begin
        busy[i]   <= 0;
        result[i] <= analog[i];
      end else if (busy[i] != 0) begin
        busy[i] <= busy[i] - 1;
      end
    end
  end

endmodule
