// seg7_display: shows the four sensor readings on a 4-digit 7-segment display.
//
// The board's display is multiplexed: one set of segment lines is shared
// and one anode line per digit picks which digit lights. On every `tick`
// the next digit is selected and shows the high nibble of its reading as a
// hexadecimal digit, 0 to F, as in the original design (reading i on
// anode i, all lines active low). The segment patterns are standard
// hexadecimal glyphs.
//
// Interface: `seg` is {g,f,e,d,c,b,a}, active low; `digit` is one-hot
// active low. Both are registered and change together on a tick.
module seg7_display
  import sp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  sensor_bus_t values,
  output logic [6:0]  seg,
  output logic [3:0]  digit
);

  logic [1:0] idx;

  function automatic logic [6:0] hex_glyph(logic [3:0] n);
    unique case (n)                 //  gfedcba, 0 = lit
      4'h0: return 7'b100_0000;
      4'h1: return 7'b111_1001;
      4'h2: return 7'b010_0100;
      4'h3: return 7'b011_0000;
      4'h4: return 7'b001_1001;
      4'h5: return 7'b001_0010;
      4'h6: return 7'b000_0010;
      4'h7: return 7'b111_1000;
      4'h8: return 7'b000_0000;
      4'h9: return 7'b001_0000;
      4'hA: return 7'b000_1000;
      4'hB: return 7'b000_0011;
      4'hC: return 7'b100_0110;
      4'hD: return 7'b010_0001;
      4'hE: return 7'b000_0110;
      4'hF: return 7'b000_1110;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      idx   <= 2'd3;
      seg   <= 7'h7F;
      digit <= 4'hF;
    end else if (tick) begin
      idx   <= idx + 1'b1;
      digit <= ~(4'b0001 << (idx + 1'b1));
      seg   <= hex_glyph(values[idx + 1'b1][7:4]);
    end
  end

endmodule
