// tb_seven_seg_decoder -- checks every input of the 7-segment decoder.
// The expected patterns are written as lists of lit segment letters
// (a..g) and turned into the active-low {g,f,e,d,c,b,a} code here, so they
// are independent of the decoder's table.
module tb_seven_seg_decoder;

  logic [3:0] digit;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  seven_seg_decoder dut (.digit, .seg_n);

  function automatic logic [6:0] pattern(string lit);
    logic [6:0] p;
    p = 7'h7f;                       // all off (active low)
    foreach (lit[i]) p[3'(lit[i] - "a")] = 1'b0;
    return p;
  endfunction

  string lit_segments [16];

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lit_segments[0] = "abcdef";
    lit_segments[1] = "bc";
    lit_segments[2] = "abdeg";
    lit_segments[3] = "abcdg";
    lit_segments[4] = "bcfg";
    lit_segments[5] = "acdfg";
    lit_segments[6] = "acdefg";
    lit_segments[7] = "abc";
    lit_segments[8] = "abcdefg";
    lit_segments[9] = "abcdfg";
    for (int i = 10; i < 16; i++) lit_segments[i] = "";
    for (int i = 0; i < 16; i++) begin
      digit = 4'(i);
      #1;
      checks++;
      if (seg_n !== pattern(lit_segments[i])) begin
        failures++;
        $display("FAIL digit %0d: seg_n=%b expected %b", i, seg_n, pattern(lit_segments[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
