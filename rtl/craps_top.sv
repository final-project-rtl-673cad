// craps_top -- the complete Craps dice game: datapath, controller and the
// two 7-segment display drivers.
//
// Holding the roll button (enter) makes the two dice counters run at clock
// speed; releasing it freezes them and the game tests the sum: 7 or 11 wins
// and 2, 3 or 12 loses on the first roll, any other sum becomes the point.
// Later rolls win on the point and lose on 7. The Win or Lose light then
// stays on until the reset_game button starts a new game. The two dice are
// shown on hex1_n (first die) and hex0_n (second die).
//
// The split into datapath and controller and the signals between them
// (Roll, Sp, D7, D711, D2312, Eq) are the game's. The port polarities are
// this design's own: enter and reset_game are active-high, already
// debounced and synchronous to clk; win and lose are active-high LED drives;
// the segments are active low as on the DE1-SoC board. rst_n is an
// asynchronous, active-low power-on reset of every register.
//
// Timing: see craps_controller; the displays follow the counters with no
// delay beyond the decoder logic.
module craps_top
  import craps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,       // power-on reset, active low
  input  logic       enter,       // Enter (roll) button, 1 while pressed
  input  logic       reset_game,  // Reset (new game) button, 1 while pressed
  output logic [6:0] hex1_n,      // 7-segment display of the first die
  output logic [6:0] hex0_n,      // 7-segment display of the second die
  output logic       win,         // Win light (green)
  output logic       lose         // Lose light (red)
);

  logic        roll, sp;
  die_t        die1, die2;
  dp_status_t  status;

  craps_datapath u_dp (
    .clk    (clk),
    .rst_n  (rst_n),
    .roll   (roll),
    .sp     (sp),
    .die1   (die1),
    .die2   (die2),
    .sum    (),       // observation only
    .point  (),       // observation only
    .status (status)
  );

  craps_controller u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .enter      (enter),
    .reset_game (reset_game),
    .status     (status),
    .roll       (roll),
    .sp         (sp),
    .win        (win),
    .lose       (lose),
    .state      ()    // observation only
  );

  seven_seg_decoder u_hex1 (
    .digit ({1'b0, die1}),
    .seg_n (hex1_n)
  );

  seven_seg_decoder u_hex0 (
    .digit ({1'b0, die2}),
    .seg_n (hex0_n)
  );

endmodule
