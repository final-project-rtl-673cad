// tb_test_logic -- exhaustive test of the sum decoder: for every 4-bit sum
// the flags D7, D711 and D2312 are compared with the rules written out as
// lists of sums.
module tb_test_logic;
  import craps_pkg::*;

  sum_t sum;
  logic d7, d711, d2312;
  int   checks = 0, failures = 0;

  test_logic dut (.sum, .d7, .d711, .d2312);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      bit e7, e711, e2312;
      e7    = (s inside {7});
      e711  = (s inside {7, 11});
      e2312 = (s inside {2, 3, 12});
      sum = sum_t'(s);
      #1;
      checks += 3;
      if (d7 != e7)       begin failures++; $display("FAIL D7 sum=%0d", s); end
      if (d711 != e711)   begin failures++; $display("FAIL D711 sum=%0d", s); end
      if (d2312 != e2312) begin failures++; $display("FAIL D2312 sum=%0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
