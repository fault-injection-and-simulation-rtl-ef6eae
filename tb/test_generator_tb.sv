// Self-checking testbench of test_generator (N_IN = 4): after start the
// vectors must be 0..15 on consecutive clocks, finish must rise exactly
// 2**N_IN - 1 + LATENCY clocks after the start edge and stay high, and a
// second start must clear finish and restart the count.
module test_generator_tb;
  localparam int N = 4;
  localparam int LAT = 3;
  logic clk = 0, sreset, start, finish;
  logic [N-1:0] vec;
  int checks = 0, failures = 0;

  test_generator #(.N_IN(N), .LATENCY(LAT)) dut (
    .clk(clk), .sreset(sreset), .start(start), .test_vector(vec), .finish(finish));

  always #5 clk = ~clk;

  task automatic run_once();
    int rise;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    rise = -1;
    for (int c = 0; c < 40; c++) begin
      // c clocks after the start edge
      if (c < (1 << N)) begin
        checks++;
        if (vec !== N'(c)) begin failures++; $display("FAIL vector %0d at clock %0d", vec, c); end
      end
      if (finish && rise < 0) rise = c;
      if (rise >= 0) begin
        checks++;
        if (!finish) begin failures++; $display("FAIL finish dropped at %0d", c); end
      end
      @(posedge clk); #1;
    end
    checks++;
    if (rise != (1 << N) - 1 + LAT) begin
      failures++;
      $display("FAIL finish rose %0d clocks after start, expected %0d", rise, (1 << N) - 1 + LAT);
    end
    checks++;
    if (vec !== '1) begin failures++; $display("FAIL counter did not hold"); end
  endtask

  initial begin
    sreset = 1; start = 0;
    repeat (2) @(posedge clk); #1;
    sreset = 0;
    checks++;
    if (finish) begin failures++; $display("FAIL finish after reset"); end
    run_once();
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
