// tb_craps_controller -- self-checking test of the Craps controller.
//
// The testbench plays the role of the datapath and the player: it presses
// and releases the roll button, picks the sum of each roll and feeds the
// flags that sum produces. A model of the game written from the rules
// (first roll: 7/11 wins, 2/3/12 loses, else the sum becomes the point;
// later rolls: the point wins, 7 loses) predicts the outcome, and the
// testbench checks Roll while the button is held, Sp exactly when a point
// is set, and Win/Lose two clock edges after the button is released. It also
// presses Reset in the middle of games. Each rule is counted and must occur.
module tb_craps_controller;
  import craps_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enter = 1'b0;
  logic reset_game = 1'b0;
  dp_status_t status;
  logic roll, sp, win, lose;
  ctrl_state_t state;
  int checks = 0, failures = 0;
  int n_first_win = 0, n_first_lose = 0, n_point = 0, n_point_win = 0;
  int n_point_lose = 0, n_again = 0, n_reset = 0;

  craps_controller dut (.clk, .rst_n, .enter, .reset_game, .status, .roll, .sp, .win, .lose, .state);

  always #5 clk = ~clk;

  int cur_sum;
  int point;
  always_comb begin
    status.d7    = (cur_sum == 7);
    status.d711  = (cur_sum == 7 || cur_sum == 11);
    status.d2312 = (cur_sum == 2 || cur_sum == 3 || cur_sum == 12);
    status.eq    = (cur_sum == point);
  end

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

  // Press the roll button for `hold` cycles, then release it with the dice
  // showing `s`. Checks Roll while held and returns the sampled Sp pulse.
  task automatic do_roll(int hold, int s, output bit sp_seen);
    enter = 1'b1;
    tick();
    for (int i = 0; i < hold; i++) begin
      expect_bit(roll, 1'b1, "roll while held");
      tick();
    end
    expect_bit(roll, 1'b1, "roll in release cycle");
    enter = 1'b0;
    cur_sum = s;       // the dice stop here
    tick();
    expect_bit(roll, 1'b0, "roll off after release");
    sp_seen = sp;
    if (sp) point = s; // the register loads on the next edge
    tick();
  endtask

  task automatic new_game();
    reset_game = 1'b1;
    tick();
    reset_game = 1'b0;
    expect_bit(win, 1'b0, "win off after reset");
    expect_bit(lose, 1'b0, "lose off after reset");
    checks++;
    if (state != ST_IDLE) begin failures++; $display("FAIL not idle after reset"); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sp_seen;
    cur_sum = 2;
    point = 0;
    repeat (2) tick();
    rst_n = 1'b1;
    for (int g = 0; g < 400; g++) begin
      int s, pt;
      bit over;
      new_game();
      // Idle: nothing happens without a press.
      repeat ($urandom_range(0, 3)) begin
        tick();
        expect_bit(roll, 1'b0, "no roll while idle");
      end
      s = $urandom_range(1, 6) + $urandom_range(1, 6);
      do_roll($urandom_range(0, 5), s, sp_seen);
      if (s == 7 || s == 11) begin
        n_first_win++;
        expect_bit(sp_seen, 1'b0, "no Sp on first-roll win");
        expect_bit(win, 1'b1, "first-roll win");
        expect_bit(lose, 1'b0, "first-roll win, lose off");
        over = 1;
      end else if (s == 2 || s == 3 || s == 12) begin
        n_first_lose++;
        expect_bit(sp_seen, 1'b0, "no Sp on craps");
        expect_bit(lose, 1'b1, "craps loses");
        expect_bit(win, 1'b0, "craps, win off");
        over = 1;
      end else begin
        n_point++;
        expect_bit(sp_seen, 1'b1, "Sp stores the point");
        expect_bit(win | lose, 1'b0, "no light after point set");
        pt = s;
        over = 0;
      end
      while (!over) begin
        // Sometimes abandon the game with Reset.
        if ($urandom_range(0, 19) == 0) begin
          n_reset++;
          break;
        end
        repeat ($urandom_range(0, 3)) begin
          tick();
          expect_bit(roll, 1'b0, "no roll while waiting");
          expect_bit(win | lose, 1'b0, "no light while waiting");
        end
        s = $urandom_range(1, 6) + $urandom_range(1, 6);
        do_roll($urandom_range(0, 5), s, sp_seen);
        expect_bit(sp_seen, 1'b0, "no Sp on later roll");
        if (s == pt) begin
          n_point_win++;
          expect_bit(win, 1'b1, "point wins");
          expect_bit(lose, 1'b0, "point wins, lose off");
          over = 1;
        end else if (s == 7) begin
          n_point_lose++;
          expect_bit(lose, 1'b1, "seven loses");
          expect_bit(win, 1'b0, "seven loses, win off");
          over = 1;
        end else begin
          n_again++;
          expect_bit(win | lose, 1'b0, "roll again");
        end
      end
      if (over) begin
        // The light stays on, whatever the roll button does, until Reset.
        logic w, l;
        w = win; l = lose;
        enter = 1'b1;
        repeat (3) tick();
        enter = 1'b0;
        repeat (2) tick();
        expect_bit(win, w, "win held until reset");
        expect_bit(lose, l, "lose held until reset");
        expect_bit(roll, 1'b0, "no roll after game over");
      end
    end
    checks += 7;
    if (n_first_win == 0)  begin failures++; $display("FAIL no first-roll win"); end
    if (n_first_lose == 0) begin failures++; $display("FAIL no craps"); end
    if (n_point == 0)      begin failures++; $display("FAIL no point set"); end
    if (n_point_win == 0)  begin failures++; $display("FAIL no point win"); end
    if (n_point_lose == 0) begin failures++; $display("FAIL no seven-out"); end
    if (n_again == 0)      begin failures++; $display("FAIL no roll-again"); end
    if (n_reset == 0)      begin failures++; $display("FAIL no reset mid-game"); end
    $display("first-roll wins %0d, craps %0d, points %0d, point wins %0d, sevens %0d, roll again %0d, resets %0d",
             n_first_win, n_first_lose, n_point, n_point_win, n_point_lose, n_again, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
