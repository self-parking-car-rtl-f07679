// stability_filter: accepts a sensor reading only once it has settled.
//
// A reading is taken as real only after its upper bits (the high nibble by
// default, as in the original design) have not changed for STABLE_CYCLES
// clock cycles: 0.04 s at 50 MHz. Any change of those bits restarts the
// wait, so a short spike never reaches the output. Once the wait is over
// the output follows the input, including changes of the low bits, until
// the high bits move again.
//
// Interface: `in_data` is sampled every cycle; `out_data` is 0 after reset
// (which the zone logic reads as "far"). A new high nibble seen at one
// clock edge reaches `out_data` STABLE_CYCLES + 1 edges later, if it holds.
module stability_filter #(
  parameter int unsigned STABLE_CYCLES = 2_000_000,
  parameter int unsigned WIDTH         = 8,
  parameter int unsigned CMP_BITS      = 4   // upper bits that must be steady
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] in_data,
  output logic [WIDTH-1:0] out_data
);

  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic [CMP_BITS-1:0] held;
  logic [CW-1:0]       count;

  always_ff @(posedge clk) begin
    if (rst) begin
      held     <= '0;
      count    <= '0;
      out_data <= '0;
    end else if (in_data[WIDTH-1 -: CMP_BITS] != held) begin
      held  <= in_data[WIDTH-1 -: CMP_BITS];
      count <= '0;
    end else if (count == CW'(STABLE_CYCLES)) begin
      out_data <= in_data;
    end else begin
      count <= count + 1'b1;
    end
  end

endmodule
