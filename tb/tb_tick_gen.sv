// tb_tick_gen: checks that tick_gen strobes for exactly one cycle every DIV
// cycles, starting DIV cycles after reset.
module tb_tick_gen;
  localparam int DIV = 7;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;

  tick_gen #(.DIV(DIV)) dut (.clk(clk), .rst(rst), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last;
    repeat (3) @(posedge clk);
    rst <= 0;
    cyc = 0; last = 0;
    for (int n = 0; n < 20; ) begin
      @(posedge clk); #1;
      cyc++;
      if (tick) begin
        checks++;
        if (cyc - last != DIV) begin
          failures++;
          $display("tick %0d after %0d cycles, expected %0d", n, cyc - last, DIV);
        end
        last = cyc;
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
