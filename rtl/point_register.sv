// point_register -- holds the "point", the sum of the first roll that
// neither won nor lost.
//
// On a rising clock edge with sp (store point) high, the register takes the
// current sum; otherwise it keeps its value. The Sp load enable is the
// game's; the asynchronous, active-low power-on reset to 0 (a value no two
// dice can sum to) is this design's own choice.
module point_register
  import craps_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sp,      // store the sum as the point
  input  sum_t d,       // current sum of the dice
  output sum_t point    // stored point
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   point <= '0;
    else if (sp)  point <= d;
  end

endmodule
