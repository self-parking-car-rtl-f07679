// tb_seg7_display: the display must visit the four digits in turn, one anode
// low at a time, and show on digit i the hexadecimal glyph of the high
// nibble of reading i.
module tb_seg7_display;
  import sp_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  sensor_bus_t values;
  logic [6:0] seg;
  logic [3:0] digit;
  int checks = 0, failures = 0;

  // Lit segments of each hex glyph, as a-g letters.
  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] seg_of(string s);
    logic [6:0] lit = '0;
    for (int i = 0; i < s.len(); i++) lit[3'(s[i] - 8'd97)] = 1'b1;
    return ~lit;
  endfunction

  seg7_display dut (.clk(clk), .rst(rst), .tick(tick), .values(values), .seg(seg), .digit(digit));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos, visits [4];
    values = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    visits = '{default: 0};
    for (int n = 0; n < 64; n++) begin
      for (int i = 0; i < 4; i++) values[i] = 8'($urandom);
      values[n % 4][7:4] = 4'(n / 4);        // every nibble value appears
      tick <= 1;
      @(posedge clk);
      tick <= 0;
      #1;
      pos = -1;
      for (int i = 0; i < 4; i++) if (digit == ~(4'b1 << i)) pos = i;
      checks++;
      if (pos < 0) begin
        failures++; $display("FAIL: digit select %b not one-hot low", digit);
      end else begin
        visits[pos]++;
        checks++;
        if (pos != n % 4) begin failures++; $display("FAIL: tick %0d shows digit %0d", n, pos); end
        checks++;
        if (seg != seg_of(glyph[values[pos][7:4]])) begin
          failures++;
          $display("FAIL: digit %0d nibble %h seg %b", pos, values[pos][7:4], seg);
        end
      end
      repeat (2) @(posedge clk);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (visits[i] != 16) begin failures++; $display("FAIL: digit %0d shown %0d times", i, visits[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
