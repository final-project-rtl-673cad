// tb_point_register -- checks that the point register resets to 0, loads
// the sum on a clock edge with sp high and holds it otherwise, against a
// reference value kept in the testbench, with random sums and sp.
module tb_point_register;
  import craps_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sp = 1'b0;
  sum_t d = '0;
  sum_t point;
  int   checks = 0, failures = 0;
  int   ref_pt;
  int   loads = 0;

  point_register dut (.clk, .rst_n, .sp, .d, .point);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_pt = 0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (point != 0) begin failures++; $display("FAIL reset value %0d", point); end
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      d  = sum_t'($urandom_range(2, 12));
      sp = ($urandom_range(0, 4) == 0);
      @(posedge clk);
      if (sp) begin ref_pt = int'(d); loads++; end
      #1 checks++;
      if (int'(point) != ref_pt) begin
        failures++;
        $display("FAIL cycle %0d: point=%0d expected %0d", i, point, ref_pt);
      end
    end
    checks++;
    if (loads == 0) begin failures++; $display("FAIL no load exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
