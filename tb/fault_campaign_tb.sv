// Self-checking testbench of fault_campaign against a small model of the
// emulator. The model answers a start with finish after L clocks and with
// u/v derived from the index of the flipped bit (class = index mod 4), so
// the reported class stream, the per-class totals, the skipping of masked
// bits, the one-hot fault upload and the total campaign time can all be
// checked. A second campaign checks that the totals restart.
module fault_campaign_tb;
  import fte_pkg::*;
  localparam int NB = 40;
  localparam int L  = 7;
  localparam int IW = $clog2(NB + 1);

  logic clk = 0, rst, go, emu_start, emu_finish, emu_u, emu_v;
  logic [NB-1:0] mask, flip;
  logic class_valid, busy, done;
  logic [IW-1:0] fidx, ca, cb, cc, cd;
  fault_class_e fcls;
  int checks = 0, failures = 0;

  fault_campaign #(.N_BITS(NB)) dut (
    .clk(clk), .rst(rst), .go(go), .fault_mask(mask), .fault_flip(flip),
    .emu_start(emu_start), .emu_finish(emu_finish), .emu_u(emu_u), .emu_v(emu_v),
    .class_valid(class_valid), .fault_index(fidx), .fault_class(fcls),
    .cnt_a(ca), .cnt_b(cb), .cnt_c(cc), .cnt_d(cd), .busy(busy), .done(done));

  always #5 clk = ~clk;

  // Emulator model.
  int timer;
  always_ff @(posedge clk) begin
    if (rst) begin
      emu_finish <= 0; emu_u <= 0; emu_v <= 0; timer <= 0;
    end else if (emu_start) begin
      int ix;
      ix = -1;
      for (int i = 0; i < NB; i++) if (flip[i]) ix = i;
      emu_finish <= 0;
      timer      <= L - 1;
      emu_u      <= (ix % 4 == 1) || (ix % 4 == 3);
      emu_v      <= (ix % 4 == 2) || (ix % 4 == 3);
    end else if (timer > 0) begin
      timer <= timer - 1;
    end else if (!emu_finish && timer == 0) begin
      emu_finish <= 1;
    end
  end

  // Scoreboard of reported faults.
  int next_expected, exp_cnt[4], reported;
  always @(posedge clk) begin
    if (class_valid) begin
      reported++;
      while (next_expected < NB && !mask[next_expected]) next_expected++;
      checks += 2;
      if (int'(fidx) != next_expected) begin
        failures++; $display("FAIL reported fault %0d, expected %0d", fidx, next_expected);
      end
      if (int'(fcls) != next_expected % 4) begin
        failures++; $display("FAIL fault %0d class %0d", fidx, fcls);
      end
      exp_cnt[next_expected % 4]++;
      next_expected++;
    end
    if (busy && emu_start) begin
      checks++;
      if ($countones(flip) != 1) begin failures++; $display("FAIL flip not one-hot"); end
    end
  end

  task automatic campaign(logic [NB-1:0] m);
    int cycles, f;
    mask = m;
    next_expected = 0; reported = 0;
    exp_cnt = '{0, 0, 0, 0};
    f = $countones(m);
    @(posedge clk); #1 go = 1;
    @(posedge clk); #1 go = 0;
    cycles = 1;
    while (!done && cycles < 5000) begin @(posedge clk); #1 cycles++; end
    checks += 6;
    if (reported != f) begin failures++; $display("FAIL %0d reported, %0d expected", reported, f); end
    if (int'(ca) != exp_cnt[0] || int'(cb) != exp_cnt[1] || int'(cc) != exp_cnt[2] || int'(cd) != exp_cnt[3]) begin
      failures++; $display("FAIL totals %0d %0d %0d %0d", ca, cb, cc, cd);
    end
    if (int'(ca) + int'(cb) + int'(cc) + int'(cd) != f) begin failures++; $display("FAIL total"); end
    // (5 + L) clocks per fault, one per skipped bit, two around go and done
    if (cycles != f * (5 + L) + (NB - f) + 2) begin
      failures++; $display("FAIL campaign took %0d clocks, expected %0d", cycles, f * (5 + L) + (NB - f) + 2);
    end
    if (flip != '0) begin failures++; $display("FAIL flip left set"); end
    if (busy) begin failures++; $display("FAIL busy with done"); end
  endtask

  initial begin
    rst = 1; go = 0; mask = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    campaign({NB{1'b1}});
    campaign(40'h00F0_F0A5_3C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
