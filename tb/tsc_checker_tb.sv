// Self-checking testbench of tsc_checker: a code word (even number of ones)
// must give {ok,fail} = {1,0}, a non-code word {0,1}; exhaustive for 6 bits,
// random for 26 bits.
module tsc_checker_tb;
  import fte_pkg::*;
  logic [5:0]  w6;
  logic [25:0] w26;
  two_rail_t   c6, c26;
  int          checks = 0, failures = 0;

  tsc_checker                 dut6  (.code_in(w6),  .check(c6));
  tsc_checker #(.WIDTH(26))   dut26 (.code_in(w26), .check(c26));

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic e6, e26;
      w6  = 6'(t);
      w26 = 26'($urandom);
      #1;
      e6  = ($countones(w6)  % 2) == 0;
      e26 = ($countones(w26) % 2) == 0;
      checks += 2;
      if (c6  !== '{ok: e6,  fail: !e6})  begin failures++; $display("FAIL 6: %b -> %b", w6, c6); end
      if (c26 !== '{ok: e26, fail: !e26}) begin failures++; $display("FAIL 26: %h -> %b", w26, c26); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
