// tb_debouncer: glitches shorter than the debounce time must not reach the
// output; a steady press must, within STABLE + 4 cycles, and so must the
// release.
module tb_debouncer;
  localparam int STABLE = 20;
  logic clk = 0, rst = 1, noisy = 0, clean;
  int checks = 0, failures = 0;

  debouncer #(.STABLE_CYCLES(STABLE)) dut (.clk(clk), .rst(rst), .noisy(noisy), .clean(clean));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen_high, lat;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    // Bouncing: pulses shorter than STABLE cycles.
    seen_high = 0;
    for (int g = 0; g < 10; g++) begin
      noisy <= 1;
      repeat (1 + $urandom_range(STABLE - 5)) begin @(posedge clk); if (clean) seen_high++; end
      noisy <= 0;
      repeat (1 + $urandom_range(STABLE - 5)) begin @(posedge clk); if (clean) seen_high++; end
    end
    repeat (STABLE + 10) begin @(posedge clk); if (clean) seen_high++; end
    check(seen_high == 0, "glitch reached the output");
    // Steady press.
    noisy <= 1;
    lat = 0;
    while (!clean && lat < 5 * STABLE) begin @(posedge clk); #1; lat++; end
    check(clean == 1, "steady press never reached the output");
    check(lat >= STABLE && lat <= STABLE + 4, $sformatf("press latency %0d", lat));
    // Release.
    noisy <= 0;
    lat = 0;
    while (clean && lat < 5 * STABLE) begin @(posedge clk); #1; lat++; end
    check(clean == 0, "release never reached the output");
    check(lat >= STABLE && lat <= STABLE + 4, $sformatf("release latency %0d", lat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
