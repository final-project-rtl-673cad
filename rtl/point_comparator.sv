// point_comparator -- Eq = 1 when the current sum equals the stored point.
//
// Purely combinational equality test of two 4-bit values, as the game's
// datapath describes it.
module point_comparator
  import craps_pkg::*;
(
  input  sum_t sum,
  input  sum_t point,
  output logic eq
);

  assign eq = (sum == point);

endmodule
