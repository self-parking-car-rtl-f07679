// tb_pwm_gen: for every duty cycle 0..10 (and 12, which must act as 10) the
// output must be high for exactly duty tenths of each 10-tick period, with
// each high time one unbroken pulse per period.
module tb_pwm_gen;
  import sp_pkg::*;
  localparam int TDIV = 3;                 // clock cycles per tick
  localparam int PERIOD_CYC = 10 * TDIV;   // clock cycles per PWM period
  logic clk = 0, rst = 1, tick = 0, pwm;
  duty_t duty = '0;
  int checks = 0, failures = 0;
  int tcount = 0;

  pwm_gen dut (.clk(clk), .rst(rst), .tick(tick), .duty(duty), .pwm(pwm));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    tcount <= (tcount == TDIV - 1) ? 0 : tcount + 1;
    tick   <= (tcount == TDIV - 1);
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int d = 0; d <= 12; d++) begin
      int high, rises, expect_d;
      logic prev;
      if (d == 11) continue;
      duty <= duty_t'(d);
      expect_d = (d > 10) ? 10 : d;
      repeat (2 * PERIOD_CYC) @(posedge clk);   // let the new value take hold
      high = 0; rises = 0; prev = pwm;
      repeat (4 * PERIOD_CYC) begin
        @(posedge clk); #1;
        if (pwm) high++;
        if (pwm && !prev) rises++;
        prev = pwm;
      end
      checks++;
      if (high != 4 * expect_d * TDIV) begin
        failures++;
        $display("FAIL duty %0d: high %0d of %0d cycles", d, high, 4 * PERIOD_CYC);
      end
      checks++;
      if (expect_d > 0 && expect_d < 10 && (rises < 3 || rises > 5)) begin
        failures++;
        $display("FAIL duty %0d: %0d rising edges in 4 periods", d, rises);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
