// tb_rolling_average: random readings at random intervals; every output is
// compared with the mean (truncated) of the last 8 inputs, the buffer
// starting at zero, and must appear exactly one cycle after its input.
module tb_rolling_average;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;
  int hist [8] = '{default: 0};

  rolling_average #(.WINDOW(8), .WIDTH(8)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .out_data(out_data), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum, expected;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      logic [7:0] v;
      v = (n % 50 == 49) ? 8'hFF : 8'($urandom);
      in_valid <= 1; in_data <= v;
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(v);
      sum = 0;
      for (int k = 0; k < 8; k++) sum += hist[k];
      expected = sum / 8;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid || out_data != 8'(expected)) begin
        failures++;
        $display("FAIL n=%0d valid=%0b out=%0d expected=%0d", n, out_valid, out_data, expected);
      end
      repeat ($urandom_range(3)) begin
        @(posedge clk); #1;
        checks++;
        if (out_valid) begin failures++; $display("FAIL: spurious out_valid"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
