// tb_stability_filter: a change of the high nibble must reach the output
// on the (STABLE + 2)th clock edge after it appears, spikes shorter than that must
// never reach it, and low-nibble changes of a settled reading pass at once.
module tb_stability_filter;
  localparam int STABLE = 50;
  logic clk = 0, rst = 1;
  logic [7:0] in_data = 8'h00, out_data;
  int checks = 0, failures = 0;

  stability_filter #(.STABLE_CYCLES(STABLE)) dut (
    .clk(clk), .rst(rst), .in_data(in_data), .out_data(out_data));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Step to v and count the cycles until the output shows it.
  task automatic step(logic [7:0] v);
    int lat;
    in_data <= v;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (out_data != v && lat < 4 * STABLE);
    check(out_data == v, $sformatf("0x%02h never reached the output", v));
    check(lat == STABLE + 2, $sformatf("0x%02h took %0d cycles, expected %0d", v, lat, STABLE + 2));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(out_data == 8'h00, "output not zero after reset");
    step(8'h62);
    step(8'hA7);
    step(8'h31);
    // Spikes of different lengths, all shorter than the settling time.
    for (int s = 1; s < STABLE; s += 7) begin
      in_data <= 8'hE0;
      repeat (s) begin @(posedge clk); #1; check(out_data == 8'h31, "spike reached the output"); end
      in_data <= 8'h31;
      repeat (2) begin @(posedge clk); #1; check(out_data == 8'h31, "spike reached the output"); end
    end
    repeat (STABLE + 3) @(posedge clk);
    // Low-nibble change of a settled reading.
    in_data <= 8'h3C;
    repeat (2) @(posedge clk);
    #1 check(out_data == 8'h3C, "low-nibble change did not pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
