// dice_adder -- adds the two die values into the sum the game tests.
//
// Purely combinational. Each input is 1..6, so the sum is 2..12 and fits in
// the 4-bit sum; the inputs are zero-extended before the add so no carry is
// lost. The adder is part of the game's datapath; the widths are this
// design's own choice.
module dice_adder
  import craps_pkg::*;
(
  input  die_t a,
  input  die_t b,
  output sum_t sum
);

  assign sum = sum_t'(a) + sum_t'(b);

endmodule
