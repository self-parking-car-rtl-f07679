// debouncer: cleans up the start/reset push button.
//
// The raw input is compared with the last value seen; every change restarts
// a counter, and only when the input has been steady for STABLE_CYCLES
// clock cycles (0.01 s at 50 MHz, as on the original board) is it copied to
// `clean`. A two-flop synchronizer in front of it is this implementation's
// addition, because the button is asynchronous to the clock.
//
// Interface: `noisy` is the raw button, `clean` the debounced level. Latency
// is two synchronizer cycles plus STABLE_CYCLES + 1 cycles.
module debouncer #(
  parameter int unsigned STABLE_CYCLES = 500_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);

  localparam int unsigned W = $clog2(STABLE_CYCLES + 1);

  logic [1:0]   sync;
  logic         last;
  logic [W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= '0;
      last  <= 1'b0;
      count <= '0;
      clean <= 1'b0;
    end else begin
      sync <= {sync[0], noisy};
      if (sync[1] != last) begin
        last  <= sync[1];
        count <= '0;
      end else if (count == W'(STABLE_CYCLES)) begin
        clean <= last;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
