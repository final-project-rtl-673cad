// tb_dice_adder -- exhaustive test of the dice adder over every pair of
// 3-bit inputs, compared with integer addition.
module tb_dice_adder;
  import craps_pkg::*;

  die_t a, b;
  sum_t sum;
  int   checks = 0, failures = 0;

  dice_adder dut (.a, .b, .sum);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        a = die_t'(i);
        b = die_t'(j);
        #1;
        checks++;
        if (int'(sum) != i + j) begin
          failures++;
          $display("FAIL %0d + %0d gave %0d", i, j, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
