// Self-checking testbench of comparator: equal vectors, single-bit and random
// differences, for the 8-bit default and an odd 9-bit and a 26-bit width.
module comparator_tb;
  import fte_pkg::*;
  logic [7:0]  r8, s8;
  logic [8:0]  r9, s9;
  logic [25:0] r26, s26;
  logic        e8, e9, e26;
  two_rail_t   t8, t9, t26;
  int          checks = 0, failures = 0;

  comparator               dut8  (.r(r8),  .s(s8),  .equal(e8),  .cmp(t8));
  comparator #(.WIDTH(9))  dut9  (.r(r9),  .s(s9),  .equal(e9),  .cmp(t9));
  comparator #(.WIDTH(26)) dut26 (.r(r26), .s(s26), .equal(e26), .cmp(t26));

  task automatic check(logic eq, two_rail_t t, logic exp, string name);
    checks++;
    if (eq !== exp || t.ok !== exp || t.fail !== !exp) begin
      failures++;
      $display("FAIL %s: equal=%b pair=%b expected %b", name, eq, t, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 600; t++) begin
      r8 = 8'($urandom); r9 = 9'($urandom); r26 = 26'($urandom);
      unique case (t % 3)
        0: begin s8 = r8; s9 = r9; s26 = r26; end
        1: begin
             s8  = r8  ^ (8'd1  << ($urandom % 8));
             s9  = r9  ^ (9'd1  << ($urandom % 9));
             s26 = r26 ^ (26'd1 << ($urandom % 26));
           end
        default: begin s8 = 8'($urandom); s9 = 9'($urandom); s26 = 26'($urandom); end
      endcase
      #1;
      check(e8,  t8,  r8  == s8,  "w8");
      check(e9,  t9,  r9  == s9,  "w9");
      check(e26, t26, r26 == s26, "w26");
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
