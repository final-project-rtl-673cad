// seven_seg_decoder -- turns a die value into the segment pattern of one
// 7-segment display.
//
// Purely combinational. Output bit i drives segment i in the usual a..g
// order (bit 0 = a, top; bit 1 = b, upper right; bit 2 = c, lower right;
// bit 3 = d, bottom; bit 4 = e, lower left; bit 5 = f, upper left;
// bit 6 = g, middle). The segments are active low, as on the DE1-SoC
// board's displays: 0 lights a segment. The digits 0..9 are decoded;
// other values blank the display. The game only says the two dice are shown
// on 7-segment displays; the decoder, its bit order and polarity are this
// design's own choices.
module seven_seg_decoder (
  input  logic [3:0] digit,
  output logic [6:0] seg_n    // active-low segments, {g,f,e,d,c,b,a}
);

  logic [6:0] seg;            // active-high pattern, {g,f,e,d,c,b,a}

  always_comb begin
    unique case (digit)
      4'd0:    seg = 7'b011_1111;
      4'd1:    seg = 7'b000_0110;
      4'd2:    seg = 7'b101_1011;
      4'd3:    seg = 7'b100_1111;
      4'd4:    seg = 7'b110_0110;
      4'd5:    seg = 7'b110_1101;
      4'd6:    seg = 7'b111_1101;
      4'd7:    seg = 7'b000_0111;
      4'd8:    seg = 7'b111_1111;
      4'd9:    seg = 7'b110_1111;
      default: seg = 7'b000_0000;
    endcase
  end

  assign seg_n = ~seg;

endmodule
