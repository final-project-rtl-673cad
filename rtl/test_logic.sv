// test_logic -- decodes the sum of the dice into the three flags the
// controller needs to apply the rules of Craps.
//
//   d7    = 1 when the sum is 7            (a later roll loses)
//   d711  = 1 when the sum is 7 or 11      (the first roll wins)
//   d2312 = 1 when the sum is 2, 3 or 12   (the first roll loses: craps)
//
// Purely combinational. The three definitions are the game's; the decode
// as a case statement is this design's own. Sums outside 2..12 cannot occur
// and set no flag.
module test_logic
  import craps_pkg::*;
(
  input  sum_t sum,
  output logic d7,
  output logic d711,
  output logic d2312
);

  always_comb begin
    d7    = 1'b0;
    d711  = 1'b0;
    d2312 = 1'b0;
    unique case (sum)
      sum_t'(7):                        begin d7 = 1'b1; d711 = 1'b1; end
      sum_t'(11):                       d711  = 1'b1;
      sum_t'(2), sum_t'(3), sum_t'(12): d2312 = 1'b1;
      default: ;
    endcase
  end

endmodule
