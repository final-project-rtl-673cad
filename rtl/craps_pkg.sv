// craps_pkg -- widths, constants and types shared by the Craps dice game.
//
// A die shows 1..6, so a die value fits in 3 bits; the sum of two dice is
// 2..12 and fits in 4 bits. The face count and the winning/losing sums are
// the game's rules. The bit widths, the controller's state encoding and the
// status bundle are this design's own choices.
package craps_pkg;

  // Number of faces on a die (the rules: "a value between 1 and 6").
  parameter int unsigned FACES = 6;

  // Bits for one die value and for the sum of two dice.
  parameter int unsigned DIE_W = 3;
  parameter int unsigned SUM_W = 4;

  typedef logic [DIE_W-1:0] die_t;
  typedef logic [SUM_W-1:0] sum_t;

  // Status flags the datapath reports to the controller.
  typedef struct packed {
    logic d7;      // sum is 7
    logic d711;    // sum is 7 or 11
    logic d2312;   // sum is 2, 3 or 12 (craps)
    logic eq;      // sum equals the stored point
  } dp_status_t;

  // Controller states.
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,  // new game, waiting for the first press of Enter
    ST_ROLL1  = 3'd1,  // first roll: dice count while Enter is held
    ST_TEST1  = 3'd2,  // first roll released: test 7/11, craps or point
    ST_WAIT   = 3'd3,  // point set, waiting for the next press of Enter
    ST_ROLLN  = 3'd4,  // later roll: dice count while Enter is held
    ST_TESTN  = 3'd5,  // later roll released: test point or 7
    ST_WIN    = 3'd6,  // Win light on until Reset
    ST_LOSE   = 3'd7   // Lose light on until Reset
  } ctrl_state_t;

endpackage
