// craps_controller -- the finite state machine that plays Craps.
//
// It reads the two push buttons (enter, the roll button, and reset_game)
// and the datapath flags, and drives Roll, Sp and the Win and Lose lights.
//
//   IDLE   wait for enter                       -> ROLL1 on enter
//   ROLL1  roll = 1 while enter is held         -> TEST1 on release
//   TEST1  first roll:  d711 -> WIN, d2312 -> LOSE,
//          otherwise sp = 1 (store the point)   -> WAIT
//   WAIT   wait for enter                       -> ROLLN on enter
//   ROLLN  roll = 1 while enter is held         -> TESTN on release
//   TESTN  later roll:  eq -> WIN, d7 -> LOSE,  otherwise -> WAIT
//   WIN    win = 1  until reset_game
//   LOSE   lose = 1 until reset_game
//
// reset_game returns the game to IDLE from any state, which starts a new
// game. The rules (7 or 11 wins and 2, 3 or 12 loses on the first roll; the
// point wins and 7 loses afterwards; Reset starts a new game) and the
// signal names are the game's. The state list, the separate test states and
// letting Reset act in every state are this design's own choices. The
// buttons are taken as already debounced and synchronous to clk.
//
// Timing: roll is a Moore output of ROLL1/ROLLN, so the dice step on every
// edge while the state is a roll state. sp is a Mealy output of TEST1, high
// for exactly one cycle. win and lose are Moore outputs. A game decision is
// made one cycle after enter is released. rst_n is an asynchronous,
// active-low power-on reset to IDLE.
module craps_controller
  import craps_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enter,       // roll button, 1 while held
  input  logic        reset_game,  // new-game button, 1 while held
  input  dp_status_t  status,      // D7, D711, D2312, Eq from the datapath
  output logic        roll,        // Roll: enable the dice counters
  output logic        sp,          // Sp: store the sum as the point
  output logic        win,         // Win light
  output logic        lose,        // Lose light
  output ctrl_state_t state        // current state, for observation
);

  ctrl_state_t next;

  always_comb begin
    next = state;
    sp   = 1'b0;
    unique case (state)
      ST_IDLE:  if (enter)  next = ST_ROLL1;
      ST_ROLL1: if (!enter) next = ST_TEST1;
      ST_TEST1: begin
        if (status.d711)       next = ST_WIN;
        else if (status.d2312) next = ST_LOSE;
        else begin
          sp   = 1'b1;
          next = ST_WAIT;
        end
      end
      ST_WAIT:  if (enter)  next = ST_ROLLN;
      ST_ROLLN: if (!enter) next = ST_TESTN;
      ST_TESTN: begin
        if (status.eq)      next = ST_WIN;
        else if (status.d7) next = ST_LOSE;
        else                next = ST_WAIT;
      end
      ST_WIN:   ;
      ST_LOSE:  ;
      default:  next = ST_IDLE;
    endcase
    if (reset_game) begin
      next = ST_IDLE;
      sp   = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= next;
  end

  assign roll = (state == ST_ROLL1) || (state == ST_ROLLN);
  assign win  = (state == ST_WIN);
  assign lose = (state == ST_LOSE);

  // Exactly one light, or none, is on; Sp only stores the first roll.
  a_lights_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(win && lose));
  a_sp_only_in_test1: assert property (@(posedge clk) disable iff (!rst_n) sp |-> state == ST_TEST1);

endmodule
