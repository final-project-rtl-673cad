// tb_craps_top -- end-to-end test of the complete Craps game.
//
// The testbench is the player. It holds the roll button for a random number
// of cycles, releases it, reads the two dice from the 7-segment outputs and
// checks them against its own model of the two chained dice counters (the
// second die steps every clock while rolling, the first when the second
// wraps from 6 to 1). It then applies the rules of Craps to the dice it
// expects and checks the Win and Lose lights: 7 or 11 wins and 2, 3 or 12
// loses on the first roll, otherwise the sum is the point; later rolls win
// on the point and lose on 7. A decision must show two clock edges after the
// button is released, and the light must stay on until Reset.
//
// Every mechanism of the game is counted and must happen at least once:
// first-roll win, craps, point stored, point made, seven-out, roll again,
// Reset in mid-game, and a roll long enough for the first die to wrap.
// The top is used with its default configuration (it has no parameters).
module tb_craps_top;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       enter = 1'b0;
  logic       reset_game = 1'b0;
  logic [6:0] hex1_n, hex0_n;
  logic       win, lose;

  int checks = 0, failures = 0;
  int r1, r2;          // expected dice
  int n_first_win = 0, n_craps = 0, n_point = 0, n_point_win = 0;
  int n_seven_out = 0, n_again = 0, n_reset = 0, n_die1_wrap = 0;

  craps_top dut (.clk, .rst_n, .enter, .reset_game, .hex1_n, .hex0_n, .win, .lose);

  always #5 clk = ~clk;

  // Active-low {g,f,e,d,c,b,a} code of a die face, from the lit segments.
  function automatic logic [6:0] face_code(int v);
    string lit;
    logic [6:0] p;
    case (v)
      1: lit = "bc";
      2: lit = "abdeg";
      3: lit = "abcdg";
      4: lit = "bcfg";
      5: lit = "acdfg";
      6: lit = "acdefg";
      default: lit = "";
    endcase
    p = 7'h7f;
    foreach (lit[i]) p[3'(lit[i] - "a")] = 1'b0;
    return p;
  endfunction

  // Advance one clock edge; inputs change and outputs are sampled 1 time
  // unit after the edge, clear of it.
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic expect_bit(logic got, logic want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (t=%0t)", what, got, want, $time);
    end
  endtask

  task automatic check_dice(string what);
    checks++;
    if (hex1_n !== face_code(r1) || hex0_n !== face_code(r2)) begin
      failures++;
      $display("FAIL %s: displays %b %b expected dice %0d %0d", what, hex1_n, hex0_n, r1, r2);
    end
  endtask

  // One step of the reference dice.
  task automatic step_dice();
    if (r2 == 6) begin
      r2 = 1;
      if (r1 == 6) n_die1_wrap++;
      r1 = (r1 == 6) ? 1 : r1 + 1;
    end else begin
      r2 = r2 + 1;
    end
  endtask

  // Hold the roll button for `hold` cycles and release it; returns with the
  // game's decision visible.
  task automatic roll_dice(int hold);
    enter = 1'b1;
    tick();                      // controller enters its roll state
    for (int i = 0; i < hold; i++) begin
      tick();
      step_dice();
    end
    enter = 1'b0;
    tick();                      // edge seen with the button released
    step_dice();
    check_dice("dice after release");
    expect_bit(win | lose, 1'b0, "no light before the test");
    tick();                      // decision
    check_dice("dice held after release");
  endtask

  task automatic new_game();
    reset_game = 1'b1;
    tick();
    reset_game = 1'b0;
    expect_bit(win, 1'b0, "win off after reset");
    expect_bit(lose, 1'b0, "lose off after reset");
    check_dice("dice kept across reset");
  endtask

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r1 = 1; r2 = 1;
    repeat (3) tick();
    check_dice("dice at power-on");
    rst_n = 1'b1;
    for (int g = 0; g < 500; g++) begin
      int s, pt;
      bit over;
      new_game();
      repeat ($urandom_range(0, 3)) tick();
      check_dice("dice still while idle");
      roll_dice($urandom_range(0, 80));
      s = r1 + r2;
      if (s == 7 || s == 11) begin
        n_first_win++;
        expect_bit(win, 1'b1, "first-roll win");
        expect_bit(lose, 1'b0, "first-roll win, lose off");
        over = 1;
      end else if (s == 2 || s == 3 || s == 12) begin
        n_craps++;
        expect_bit(lose, 1'b1, "craps loses");
        expect_bit(win, 1'b0, "craps, win off");
        over = 1;
      end else begin
        n_point++;
        expect_bit(win | lose, 1'b0, "point set, no light");
        pt = s;
        over = 0;
      end
      while (!over) begin
        if ($urandom_range(0, 24) == 0) begin
          n_reset++;
          break;
        end
        repeat ($urandom_range(0, 3)) begin
          tick();
          check_dice("dice still while waiting");
          expect_bit(win | lose, 1'b0, "no light while waiting");
        end
        roll_dice($urandom_range(0, 80));
        s = r1 + r2;
        if (s == pt) begin
          n_point_win++;
          expect_bit(win, 1'b1, "point made wins");
          expect_bit(lose, 1'b0, "point made, lose off");
          over = 1;
        end else if (s == 7) begin
          n_seven_out++;
          expect_bit(lose, 1'b1, "seven loses");
          expect_bit(win, 1'b0, "seven loses, win off");
          over = 1;
        end else begin
          n_again++;
          expect_bit(win | lose, 1'b0, "roll again");
        end
      end
      if (over) begin
        // Pressing roll after the game is over changes nothing.
        logic w, l;
        w = win; l = lose;
        enter = 1'b1;
        repeat (4) tick();
        enter = 1'b0;
        repeat (2) tick();
        expect_bit(win, w, "win held until reset");
        expect_bit(lose, l, "lose held until reset");
        check_dice("dice frozen after game over");
      end
    end
    checks += 8;
    if (n_first_win == 0) begin failures++; $display("FAIL no first-roll win"); end
    if (n_craps == 0)     begin failures++; $display("FAIL no craps"); end
    if (n_point == 0)     begin failures++; $display("FAIL no point stored"); end
    if (n_point_win == 0) begin failures++; $display("FAIL no point made"); end
    if (n_seven_out == 0) begin failures++; $display("FAIL no seven-out"); end
    if (n_again == 0)     begin failures++; $display("FAIL no roll again"); end
    if (n_reset == 0)     begin failures++; $display("FAIL no reset mid-game"); end
    if (n_die1_wrap == 0) begin failures++; $display("FAIL first die never wrapped"); end
    $display("first-roll wins %0d, craps %0d, points %0d, points made %0d, seven-outs %0d, roll again %0d, resets %0d, die-1 wraps %0d",
             n_first_win, n_craps, n_point, n_point_win, n_seven_out, n_again, n_reset, n_die1_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
