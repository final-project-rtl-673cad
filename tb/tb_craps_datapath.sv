// tb_craps_datapath -- self-checking test of the Craps datapath.
//
// Drives roll and sp at random and keeps, in the testbench, its own model of
// the two chained dice (the second die steps on every rolled edge, the
// first each time the second goes from 6 to 1) and of the point. Every
// cycle it checks both dice, the sum, the point and the four status flags,
// where the flags are worked out from the game's rules. It also checks that
// all 36 outcomes of the pair of dice are reached.
module tb_craps_datapath;
  import craps_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic roll = 1'b0;
  logic sp = 1'b0;
  die_t die1, die2;
  sum_t sum, point;
  dp_status_t status;
  int   checks = 0, failures = 0;
  int   r1, r2, rpt;
  bit   seen [1:6][1:6];

  craps_datapath dut (.clk, .rst_n, .roll, .sp, .die1, .die2, .sum, .point, .status);

  always #5 clk = ~clk;

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, want, $time);
    end
  endtask

  task automatic check_all();
    int s;
    s = r1 + r2;
    expect_eq(int'(die1), r1, "die1");
    expect_eq(int'(die2), r2, "die2");
    expect_eq(int'(sum), s, "sum");
    expect_eq(int'(point), rpt, "point");
    expect_eq(int'(status.d7), int'(s == 7), "D7");
    expect_eq(int'(status.d711), int'(s == 7 || s == 11), "D711");
    expect_eq(int'(status.d2312), int'(s == 2 || s == 3 || s == 12), "D2312");
    expect_eq(int'(status.eq), int'(s == rpt), "Eq");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r1 = 1; r2 = 1; rpt = 0;
    repeat (2) @(posedge clk);
    #1 check_all();
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      roll = ($urandom_range(0, 2) != 0);
      sp   = ($urandom_range(0, 5) == 0);
      #1 check_all();
      @(posedge clk);
      if (sp) rpt = r1 + r2;
      if (roll) begin
        if (r2 == 6) begin
          r2 = 1;
          r1 = (r1 == 6) ? 1 : r1 + 1;
        end else begin
          r2 = r2 + 1;
        end
      end
      seen[r1][r2] = 1'b1;
      #1 check_all();
    end
    for (int a = 1; a <= 6; a++)
      for (int b = 1; b <= 6; b++) begin
        checks++;
        if (!seen[a][b]) begin failures++; $display("FAIL outcome %0d,%0d never reached", a, b); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
