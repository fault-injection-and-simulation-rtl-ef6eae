// Self-checking testbench of parity_tree: three shapes (6 inputs with
// 2-input nodes, 6 and 26 inputs with 4-input nodes), random and corner
// vectors, compared with a count of ones.
module parity_tree_tb;
  logic [5:0]  a6;
  logic [25:0] a26;
  logic        y6_2, y6_4, y26_4;
  int          checks = 0, failures = 0;

  parity_tree #(.WIDTH(6),  .FANIN(2)) dut_a (.in_vec(a6),  .xor_out(y6_2));
  parity_tree                          dut_b (.in_vec(a6),  .xor_out(y6_4));
  parity_tree #(.WIDTH(26), .FANIN(4)) dut_c (.in_vec(a26), .xor_out(y26_4));

  function automatic logic odd(logic [25:0] x);
    int n = 0;
    for (int i = 0; i < 26; i++) if (x[i]) n++;
    return logic'(n % 2);
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      a6  = (t < 64) ? 6'(t) : 6'($urandom);
      a26 = (t == 64) ? '1 : (t == 65) ? '0 : 26'($urandom);
      #1;
      checks += 3;
      if (y6_2  !== odd({20'b0, a6})) begin failures++; $display("FAIL w6/f2 %b", a6); end
      if (y6_4  !== odd({20'b0, a6})) begin failures++; $display("FAIL w6/f4 %b", a6); end
      if (y26_4 !== odd(a26))         begin failures++; $display("FAIL w26 %b", a26); end
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
