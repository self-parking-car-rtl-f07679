// rolling_average: moving average of one sensor over its last WINDOW readings.
//
// The IR sensors are noisy, so each raw reading is averaged with the seven
// before it (window of 8, as in the original design). On every `in_valid`
// the oldest sample in a circular buffer is replaced by `in_data` and a
// running sum is updated by (new - oldest); the average is the sum shifted
// right by log2(WINDOW), i.e. truncated. The buffer starts full of zeros,
// so the first WINDOW-1 averages ramp up from zero. Keeping a running sum
// rather than adding all eight samples is this implementation's choice.
//
// Interface: `out_data` changes and `out_valid` pulses one cycle after
// each `in_valid`.
module rolling_average #(
  parameter int unsigned WINDOW = 8,   // must be a power of two
  parameter int unsigned WIDTH  = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid
);

  localparam int unsigned AW = (WINDOW > 1) ? $clog2(WINDOW) : 1;
  localparam int unsigned SW = WIDTH + $clog2(WINDOW);

  logic [WIDTH-1:0] window [WINDOW];
  logic [AW-1:0]    wr_ptr;
  logic [SW-1:0]    sum;
  logic [SW-1:0]    sum_next;

  assign sum_next = sum + SW'(in_data) - SW'(window[wr_ptr]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < WINDOW; i++) window[i] <= '0;
      wr_ptr    <= '0;
      sum       <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        window[wr_ptr] <= in_data;
        wr_ptr         <= (wr_ptr == AW'(WINDOW - 1)) ? '0 : wr_ptr + 1'b1;
        sum            <= sum_next;
        out_data       <= WIDTH'(sum_next >> $clog2(WINDOW));
      end
    end
  end

  initial assert (WINDOW >= 2 && (WINDOW & (WINDOW - 1)) == 0)
    else $error("rolling_average: WINDOW must be a power of two");

endmodule
