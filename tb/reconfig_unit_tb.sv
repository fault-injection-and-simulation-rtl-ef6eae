// Self-checking testbench of reconfig_unit: every combination of the four
// OK/FAIL pairs (including non-complementary ones) is applied in the running
// state, and the request, out_valid and halt are compared with the decision
// table worked out here. Each decision is followed through the
// reconfiguration handshake (request held until reconf_done, then exactly
// one sync_reset clock, then running again).
module reconfig_unit_tb;
  import fte_pkg::*;
  logic clk = 0, rst, done_i, sync_reset, halt;
  two_rail_t tsc1, tsc2, cmp1, cmp2;
  logic [1:0] req, valid;
  int checks = 0, failures = 0;
  int n_single = 0, n_both = 0;

  reconfig_unit dut (
    .clk(clk), .rst(rst), .tsc1(tsc1), .tsc2(tsc2), .cmp1(cmp1), .cmp2(cmp2),
    .reconf_done(done_i), .reconf_req(req), .sync_reset(sync_reset),
    .out_valid(valid), .halt(halt));

  always #5 clk = ~clk;

  localparam two_rail_t GOOD = '{ok: 1'b1, fail: 1'b0};

  function automatic logic [1:0] decide(logic [7:0] p);
    logic e1, e2, d;
    e1 = p[7:6] != 2'b10;
    e2 = p[5:4] != 2'b10;
    d  = (p[3:2] != 2'b10) || (p[1:0] != 2'b10);
    if (!d) return {e2, e1};
    if (e1 && !e2) return 2'b01;
    if (e2 && !e1) return 2'b10;
    return 2'b11;
  endfunction

  initial begin
    rst = 1; done_i = 0;
    tsc1 = GOOD; tsc2 = GOOD; cmp1 = GOOD; cmp2 = GOOD;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int p = 0; p < 256; p++) begin
      logic [1:0] exp;
      exp = decide(8'(p));
      {tsc1, tsc2, cmp1, cmp2} = 8'(p);
      #1;
      checks += 2;
      if (valid !== ~exp) begin failures++; $display("FAIL p=%b out_valid=%b exp=%b", p, valid, ~exp); end
      if (halt !== (exp == 2'b11)) begin failures++; $display("FAIL p=%b halt=%b", p, halt); end
      @(posedge clk); #1;
      {tsc1, tsc2, cmp1, cmp2} = {GOOD, GOOD, GOOD, GOOD};
      checks++;
      if (req !== exp) begin failures++; $display("FAIL p=%b req=%b exp=%b", p, req, exp); end
      if (exp == 2'b00) continue;
      if (exp == 2'b11) n_both++; else n_single++;
      // hold for a few clocks without acknowledge
      repeat (3) begin
        @(posedge clk); #1;
        checks += 2;
        if (req !== exp) begin failures++; $display("FAIL request dropped"); end
        if (valid !== ~exp) begin failures++; $display("FAIL out_valid during reconfiguration"); end
      end
      done_i = 1;
      @(posedge clk); #1 done_i = 0;
      checks += 3;
      if (req !== 2'b00) begin failures++; $display("FAIL request after done"); end
      if (sync_reset !== 1'b1) begin failures++; $display("FAIL no sync_reset"); end
      if (!halt) begin failures++; $display("FAIL not halted during sync"); end
      @(posedge clk); #1;
      checks += 2;
      if (sync_reset !== 1'b0) begin failures++; $display("FAIL sync_reset longer than a clock"); end
      if (valid !== 2'b11) begin failures++; $display("FAIL not running after sync"); end
    end
    checks++;
    if (n_single == 0 || n_both == 0) begin failures++; $display("FAIL decisions not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
