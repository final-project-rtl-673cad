// tb_point_comparator -- exhaustive test of the equality comparator over
// every pair of 4-bit sum and point values.
module tb_point_comparator;
  import craps_pkg::*;

  sum_t sum, point;
  logic eq;
  int   checks = 0, failures = 0;

  point_comparator dut (.sum, .point, .eq);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        sum   = sum_t'(i);
        point = sum_t'(j);
        #1;
        checks++;
        if (eq != (i == j)) begin
          failures++;
          $display("FAIL sum=%0d point=%0d eq=%0b", i, j, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
