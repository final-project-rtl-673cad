// tb_dice_counter -- self-checking test of one die counter.
//
// Drives en with a random pattern for many cycles and checks, every cycle,
// the counter value and wrap output against a reference die kept in the
// testbench (1..6, stepping on enabled edges, 6 -> 1). Also checks that the
// counter holds while disabled, visits every face and that a run of six
// enabled cycles brings it back to the same face (the wrap-around period).
module tb_dice_counter;
  import craps_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  die_t value;
  logic wrap;
  int   checks = 0, failures = 0;
  int   ref_val;
  bit   seen [1:6];

  dice_counter dut (.clk, .rst_n, .en, .value, .wrap);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: value=%0d wrap=%0b expected value=%0d", what, value, wrap, ref_val);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_val = 1;
    repeat (2) @(posedge clk);
    #1 check(value == 1, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 3) != 0);
      #1 check(wrap == (en && ref_val == 6), "wrap");
      @(posedge clk);
      if (en) ref_val = (ref_val == 6) ? 1 : ref_val + 1;
      #1 check(value == die_t'(ref_val), "value");
      seen[ref_val] = 1'b1;
    end
    for (int f = 1; f <= 6; f++) check(seen[f], "every face visited");
    // Six enabled steps return to the same face.
    begin
      die_t start;
      start = value;
      en = 1'b1;
      repeat (6) @(posedge clk);
      #1 check(value == start, "period of six");
      en = 1'b0;
      repeat (5) @(posedge clk);
      #1 check(value == start, "hold while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
