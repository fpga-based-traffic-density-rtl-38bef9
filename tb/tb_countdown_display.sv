// tb_countdown_display: self-checking test of the countdown digits.
//
// Every value 0..127 is applied with show high and low. The expected
// segment pattern is built here from a table of lit segments per digit
// (a..g, active low), independent of the module's encoding: units on
// hex0, tens on hex1 with a dark leading zero, 99 for values above 99,
// and both digits dark when show is low.
module tb_countdown_display;
  import traffic_pkg::*;

  logic [SEC_W-1:0] value;
  logic             show;
  logic [6:0]       hex0, hex1;
  int checks = 0, failures = 0;

  countdown_display dut (.*);

  // Lit segments of each digit, as letters.
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  function automatic logic [6:0] pattern(int digit);
    logic [6:0] p = 7'h7F;
    string s = lit[digit];
    for (int i = 0; i < s.len(); i++) p[3'(s[i] - "a")] = 1'b0;
    return p;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int i = 0; i < 128; i++) begin
      value = SEC_W'(i);
      v = (i > 99) ? 99 : i;
      show = 1'b1;
      #1;
      check(hex0 == pattern(v % 10), $sformatf("units of %0d: %07b", i, hex0));
      if (v < 10) check(hex1 == 7'h7F, $sformatf("tens of %0d dark", i));
      else        check(hex1 == pattern(v / 10), $sformatf("tens of %0d: %07b", i, hex1));
      show = 1'b0;
      #1;
      check(hex0 == 7'h7F && hex1 == 7'h7F, $sformatf("blank at %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
