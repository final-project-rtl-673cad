// dice_counter -- one die: a counter that steps 1, 2, ..., FACES, 1, ...
//
// While `en` is high the value advances by one every clock and wraps from
// FACES back to 1. Clocked fast while the roll button is held, the value at
// release is unpredictable to the player, which is how the game makes its
// pseudo-random die. `wrap` is high in a cycle where the counter is enabled
// and at FACES, that is, when the next edge returns it to 1; it lets a
// second die be chained to this one. Counting 1..6 is the game's rule; the
// wrap output and the reset value of 1 are this design's own choices.
//
// Timing: value changes on the rising clock edge after en is seen high.
// rst_n is an asynchronous, active-low power-on reset.
module dice_counter
  import craps_pkg::*;
#(
  parameter int unsigned N_FACES = FACES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,      // count this cycle
  output die_t value,   // current face, 1..N_FACES
  output logic wrap     // en and value == N_FACES
);

  localparam die_t TOP = die_t'(N_FACES);

  assign wrap = en && (value == TOP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      value <= die_t'(1);
    else if (wrap)   value <= die_t'(1);
    else if (en)     value <= value + die_t'(1);
  end

endmodule
