// craps_datapath -- the datapath of the Craps game.
//
// Two 1-to-6 counters stand for the dice. The adder sums them, the test
// logic flags the sums the rules care about (7, 7 or 11, and 2, 3 or 12),
// the point register keeps the point when the controller raises sp, and the
// comparator reports whether the current sum equals that point. The
// controller sees only the four flags and drives only roll and sp.
//
// The two counters are chained: with roll high the second die steps every
// clock and the first die steps each time the second wraps from 6 to 1, so
// the pair walks through all 36 outcomes in turn and every outcome is
// equally likely for a random hold time. The units and their connections
// follow the game's datapath; the chaining of the two counters is this
// design's own choice (the datapath drives the counters from roll but does
// not say how the two are related).
//
// Timing: the dice step on rising edges while roll is high. The sum and the
// four flags are combinational from the counter and point registers, so
// they are valid in the cycle after roll falls and stay valid while roll is
// low. point is loaded on the edge at which sp is high.
module craps_datapath
  import craps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,   // asynchronous, active-low power-on reset
  input  logic       roll,    // Roll: enables the dice counters
  input  logic       sp,      // Sp: store the sum in the point register
  output die_t       die1,    // value of the first die, 1..6
  output die_t       die2,    // value of the second die, 1..6
  output sum_t       sum,     // die1 + die2
  output sum_t       point,   // stored point
  output dp_status_t status   // D7, D711, D2312, Eq
);

  logic wrap2;
  logic unused_wrap1;

  dice_counter u_die2 (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (roll),
    .value (die2),
    .wrap  (wrap2)
  );

  dice_counter u_die1 (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (wrap2),
    .value (die1),
    .wrap  (unused_wrap1)
  );

  dice_adder u_adder (
    .a   (die1),
    .b   (die2),
    .sum (sum)
  );

  point_register u_point (
    .clk   (clk),
    .rst_n (rst_n),
    .sp    (sp),
    .d     (sum),
    .point (point)
  );

  point_comparator u_cmp (
    .sum   (sum),
    .point (point),
    .eq    (status.eq)
  );

  test_logic u_test (
    .sum   (sum),
    .d7    (status.d7),
    .d711  (status.d711),
    .d2312 (status.d2312)
  );

endmodule
