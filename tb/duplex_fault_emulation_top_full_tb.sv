// Full-size testbench of duplex_fault_emulation_top at its default parameters
// (18 inputs, 26 outputs, 360 LUTs): the example circuit is embedded in the
// full fabric, inputs x4..x17 are don't-cares, and each fault is tested
// with all 2**18 input vectors.
//
// Duplex half: both FPGAs are loaded with the example circuit (embedded in
// a fabric of N_LUT LUTs with the unused LUTs filled with random contents);
// each trial upsets one random LUT bit in FPGA 1 or FPGA 2 (or none) and
// applies random primary inputs. Every clock, the primary outputs and the
// reconfiguration decision are compared with a reference built from the
// explicit netlist. A model of the configuration port answers a request by
// reloading the fault-free contents into the requested FPGAs and raising
// reconf_done, after which one sync_reset clock must follow.
// Emulator half: a fault campaign over four LUT bits of the example circuit, one
// of each class (LUT2 bit 1, LUT5 bit 0, LUT1 bit 1, LUT0 bit 3) must report, for each
// fault, the class the reference gives and matching A/B/C/D totals, and
// take exactly f * (2**N_IN + 7) + (bits - f) + 2 clocks.
// Mechanisms counted (each must occur): classes A, B, C, D; reconfiguration
// of FPGA 1 alone, of FPGA 2 alone, of both with halt; resynchronisation.
module duplex_fault_emulation_top_full_tb;
  import fte_pkg::*;
  import tb_example_pkg::*;

  localparam int N_IN   = 18;
  localparam int N_OUT  = 26;
  localparam int N_LUT  = 360;
  localparam int SELW   = $clog2(N_IN + N_LUT + 1);
  localparam int N_BITS = N_LUT * 16;
  localparam int IDXW   = $clog2(N_BITS + 1);
  localparam int TRIALS = 60;

  logic clk = 0, rst;
  logic [N_IN-1:0] pi;
  logic [N_LUT-1:0][15:0] cfg1, cfg2, golden, em_cfg;
  logic [N_LUT-1:0][3:0][SELW-1:0] route;
  logic [N_OUT-1:0][SELW-1:0] osel;
  logic reconf_done;
  logic [N_OUT-1:0] po1, po2;
  two_rail_t tsc1, tsc2, cmp1, cmp2;
  logic [1:0] req, valid;
  logic sync_reset, halt;
  logic [N_BITS-1:0] fmask;
  logic [N_IN-1:0] uvec;
  logic vsel, go, class_valid, busy, done;
  logic [IDXW-1:0] fidx, ca, cb, cc, cd;
  fault_class_e fcls;

  int checks = 0, failures = 0;
  int n_class[4] = '{0, 0, 0, 0};
  int n_re1 = 0, n_re2 = 0, n_both = 0, n_sync = 0;

  duplex_fault_emulation_top dut (
    .clk(clk), .rst(rst),
    .pi(pi), .dx_lut_cfg1(cfg1), .dx_lut_cfg2(cfg2), .dx_route_cfg(route),
    .dx_out_sel(osel), .dx_reconf_done(reconf_done), .po1(po1), .po2(po2),
    .dx_tsc1(tsc1), .dx_tsc2(tsc2), .dx_cmp1(cmp1), .dx_cmp2(cmp2),
    .dx_reconf_req(req), .dx_sync_reset(sync_reset), .dx_out_valid(valid), .dx_halt(halt),
    .em_lut_cfg(em_cfg), .em_route_cfg(route), .em_out_sel(osel), .em_fault_mask(fmask),
    .em_user_vector(uvec), .em_vector_select(vsel), .em_go(go),
    .em_class_valid(class_valid), .em_fault_index(fidx), .em_fault_class(fcls),
    .em_cnt_a(ca), .em_cnt_b(cb), .em_cnt_c(cc), .em_cnt_d(cd), .em_busy(busy), .em_done(done));

  always #5 clk = ~clk;

  function automatic logic [SELW-1:0] map_sel(logic [3:0] s);
    if (s == TIE) return '1;
    if (s < 4)    return SELW'(s);
    return SELW'(N_IN + int'(s) - 4);
  endfunction

  function automatic ex_cfg_t slice(logic [N_LUT-1:0][15:0] c);
    ex_cfg_t e;
    for (int k = 0; k < EX_N_LUT; k++) e[k] = c[k];
    return e;
  endfunction

  task automatic build_config();
    ex_cfg_t gc;
    ex_route_t gr;
    ex_osel_t go_;
    gc = golden_cfg(); gr = golden_route(); go_ = golden_osel();
    for (int k = 0; k < N_LUT; k++) begin
      if (k < EX_N_LUT) begin
        golden[k] = gc[k];
        for (int j = 0; j < 4; j++) route[k][j] = map_sel(gr[k][j]);
      end else begin
        golden[k] = 16'($urandom);
        for (int j = 0; j < 4; j++) route[k][j] = '1;
      end
    end
    for (int o = 0; o < N_OUT; o++) osel[o] = (o < EX_N_OUT) ? map_sel(go_[o]) : '1;
  endtask

  // ---------------- duplex half ----------------
  function automatic logic [1:0] expected_decision(logic [3:0] x);
    logic [3:0] r1, r2;
    logic e1, e2;
    r1 = ref_eval(slice(cfg1), x);
    r2 = ref_eval(slice(cfg2), x);
    e1 = ^r1;
    e2 = ^r2;
    if (r1 != r2) begin
      if (e1 && !e2) return 2'b01;
      if (e2 && !e1) return 2'b10;
      return 2'b11;
    end
    return {e2, e1};
  endfunction

  task automatic duplex_trial();
    int which, b;
    logic [1:0] exp;
    which = $urandom % 3;
    b = $urandom % (EX_N_LUT * 16);
    if (which == 1) cfg1[b / 16][b % 16] = ~cfg1[b / 16][b % 16];
    if (which == 2) cfg2[b / 16][b % 16] = ~cfg2[b / 16][b % 16];
    for (int c = 0; c < 12; c++) begin
      pi = N_IN'($urandom);
      #1;
      exp = expected_decision(pi[3:0]);
      checks += 3;
      if (po1[3:0] !== ref_eval(slice(cfg1), pi[3:0]) || po2[3:0] !== ref_eval(slice(cfg2), pi[3:0])) begin
        failures++; $display("FAIL duplex outputs pi=%h", pi);
      end
      if (valid !== ~exp) begin failures++; $display("FAIL out_valid=%b expected %b", valid, ~exp); end
      if (halt !== (exp == 2'b11)) begin failures++; $display("FAIL halt=%b", halt); end
      @(posedge clk); #1;
      checks++;
      if (req !== exp) begin failures++; $display("FAIL reconf_req=%b expected %b", req, exp); end
      if (exp != 2'b00) begin
        if (exp == 2'b01) n_re1++;
        if (exp == 2'b10) n_re2++;
        if (exp == 2'b11) n_both++;
        // configuration port: reload the requested FPGAs, then acknowledge
        if (exp[0]) cfg1 = golden;
        if (exp[1]) cfg2 = golden;
        repeat (2) @(posedge clk);
        #1 reconf_done = 1;
        @(posedge clk); #1 reconf_done = 0;
        checks++;
        if (!sync_reset) begin failures++; $display("FAIL no sync_reset"); end
        else n_sync++;
        @(posedge clk); #1;
        checks++;
        if (req !== 2'b00 || valid !== 2'b11 && cfg1 == golden && cfg2 == golden) begin
          failures++; $display("FAIL not running after resynchronisation");
        end
        break;
      end
    end
    cfg1 = golden;
    cfg2 = golden;
  endtask

  // ---------------- emulator half ----------------
  int exp_cnt[4], reported, uv_mode;
  logic [3:0] uv_low;

  function automatic int class_one_vector(ex_cfg_t faulty, logic [3:0] x);
    logic [3:0] rf, rg;
    rf = ref_eval(faulty, x);
    rg = ref_eval(golden_cfg(), x);
    if (rf == rg) return 0;
    return (^rf) ? 1 : 2;
  endfunction

  always @(posedge clk) begin
    if (class_valid && !rst) begin
      ex_cfg_t fc;
      int e;
      reported++;
      fc = golden_cfg();
      if (int'(fidx) < EX_N_LUT * 16) fc[fidx / 16][fidx % 16] = ~fc[fidx / 16][fidx % 16];
      e = uv_mode ? class_one_vector(fc, uv_low) : ref_class(fc);
      exp_cnt[e]++;
      if (!uv_mode) n_class[e]++;
      checks++;
      if (int'(fcls) != e) begin failures++; $display("FAIL fault %0d class %0d expected %0d", fidx, fcls, e); end
    end
  end

  task automatic campaign(logic [N_BITS-1:0] m, int user_mode);
    int cycles, f, expect_cycles;
    fmask = m;
    uv_mode = user_mode;
    vsel = logic'(user_mode);
    uvec = N_IN'($urandom);
    uv_low = uvec[3:0];
    reported = 0;
    exp_cnt = '{0, 0, 0, 0};
    f = $countones(m);
    @(posedge clk); #1 go = 1;
    @(posedge clk); #1 go = 0;
    cycles = 1;
    while (!done && cycles < 100_000_000) begin @(posedge clk); #1 cycles++; end
    expect_cycles = f * ((1 << N_IN) + 7) + (N_BITS - f) + 2;
    checks += 3;
    if (reported != f) begin failures++; $display("FAIL %0d faults reported, %0d injected", reported, f); end
    if (int'(ca) != exp_cnt[0] || int'(cb) != exp_cnt[1] || int'(cc) != exp_cnt[2] || int'(cd) != exp_cnt[3]) begin
      failures++; $display("FAIL totals A=%0d B=%0d C=%0d D=%0d", ca, cb, cc, cd);
    end
    if (cycles != expect_cycles) begin
      failures++; $display("FAIL campaign took %0d clocks, expected %0d", cycles, expect_cycles);
    end
    $display("campaign: %0d faults, A=%0d B=%0d C=%0d D=%0d, %0d clocks", f, ca, cb, cc, cd, cycles);
  endtask

  initial begin
    logic [N_BITS-1:0] m;
    rst = 1; go = 0; vsel = 0; uvec = '0; pi = '0; reconf_done = 0; fmask = '0;
    build_config();
    cfg1 = golden; cfg2 = golden; em_cfg = golden;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < TRIALS; t++) duplex_trial();
    m = '0;
    m[2*16+1] = 1'b1;
    m[5*16+0] = 1'b1;
    m[1*16+1] = 1'b1;
    m[0*16+3] = 1'b1;
    campaign(m, 0);

    checks += 8;
    for (int c = 0; c < 4; c++)
      if (n_class[c] == 0) begin failures++; $display("FAIL class %0d never produced", c); end
    if (n_re1 == 0)  begin failures++; $display("FAIL FPGA 1 never reconfigured alone"); end
    if (n_re2 == 0)  begin failures++; $display("FAIL FPGA 2 never reconfigured alone"); end
    if (n_both == 0) begin failures++; $display("FAIL never halted"); end
    if (n_sync == 0) begin failures++; $display("FAIL never resynchronised"); end
    $display("mechanisms: class A=%0d B=%0d C=%0d D=%0d, reconfig FPGA1=%0d FPGA2=%0d both/halt=%0d, sync=%0d",
             n_class[0], n_class[1], n_class[2], n_class[3], n_re1, n_re2, n_both, n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
