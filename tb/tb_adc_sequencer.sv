// tb_adc_sequencer: against the converter model, RD must go low for exactly
// one tick per converter, converters 0..3 in order, once every PERIOD
// ticks; each round must deliver the converters' results to raw[] and pulse
// dirty_rr once.
module tb_adc_sequencer;
  import sp_pkg::*;
  localparam int TDIV = 3, PERIOD = 12;
  logic clk = 0, rst = 1, tick = 0, rd_n, dirty_rr;
  logic [1:0] sel;
  logic [7:0] data;
  sensor_bus_t analog, raw;
  int checks = 0, failures = 0;
  int tcount = 0;

  adc_sequencer #(.PERIOD(PERIOD)) dut (
    .clk(clk), .rst(rst), .tick(tick), .adc_data(data), .adc_rd_n(rd_n),
    .adc_sel(sel), .raw(raw), .dirty_rr(dirty_rr));

  adc0804_bank #(.CONV_CYCLES(5)) adcs (
    .clk(clk), .rd_n(rd_n), .sel(sel), .analog(analog), .data(data));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    tcount <= (tcount == TDIV - 1) ? 0 : tcount + 1;
    tick   <= (tcount == TDIV - 1);
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // RD-low cycles must come in runs of TDIV, selecting 0,1,2,3 in turn.
  int low_cycles [4] = '{default: 0};
  int next_sel = 0;
  logic rd_prev = 1;
  logic [1:0] sel_prev = 0;
  always @(posedge clk) if (!rst) begin
    if (!rd_n) low_cycles[sel]++;
    // Through the multiplexer each converter sees its own RD pulse.
    if (!rd_n && (rd_prev || sel != sel_prev)) begin
      check(sel == 2'(next_sel), $sformatf("RD slot selects %0d, expected %0d", sel, next_sel));
      next_sel = (next_sel + 1) % 4;
    end
    rd_prev <= rd_n;
    sel_prev <= sel;
  end

  initial begin
    int last_rr, cyc, rounds;
    sensor_bus_t cur, prev_codes;
    analog = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    last_rr = -1; cyc = 0; rounds = 0; prev_codes = '0;
    while (rounds < 12) begin
      @(posedge clk); #1;
      cyc++;
      if (dirty_rr) begin
        rounds++;
        if (last_rr >= 0)
          check(cyc - last_rr == PERIOD * TDIV,
                $sformatf("dirty_rr period %0d, expected %0d", cyc - last_rr, PERIOD * TDIV));
        last_rr = cyc;
        // Codes change every second round; a round reads what the
        // converters sampled during the round before it.
        if (rounds % 2 == 0) begin
          if (rounds >= 4) check(raw == prev_codes, $sformatf("raw %h expected %h", raw, prev_codes));
          for (int i = 0; i < 4; i++) cur[i] = 8'($urandom);
          prev_codes = cur;
          analog = cur;
        end
      end
    end
    for (int i = 0; i < 4; i++)
      check(low_cycles[i] == 12 * TDIV || low_cycles[i] == 13 * TDIV,
            $sformatf("converter %0d read for %0d cycles", i, low_cycles[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
