// Self-checking testbench of sum1bit: random in/start/sreset sequences,
// compared with a reference flag updated the same way.
module sum1bit_tb;
  logic clk = 0, sreset, start, in, sum;
  logic ref_sum;
  int   checks = 0, failures = 0, sets = 0;

  sum1bit dut (.clk(clk), .sreset(sreset), .start(start), .in(in), .sum(sum));

  always #5 clk = ~clk;

  initial begin
    sreset = 1; start = 0; in = 0;
    @(posedge clk); #1;
    ref_sum = 0;
    sreset = 0;
    for (int t = 0; t < 500; t++) begin
      start  = ($urandom % 16) == 0;
      sreset = ($urandom % 32) == 0;
      in     = ($urandom % 8) == 0;
      @(posedge clk);
      if (sreset || start) ref_sum = 0;
      else if (in) begin ref_sum = 1; sets++; end
      #1;
      checks++;
      if (sum !== ref_sum) begin failures++; $display("FAIL t=%0d sum=%b ref=%b", t, sum, ref_sum); end
    end
    checks++;
    if (sets == 0) begin failures++; $display("FAIL never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
