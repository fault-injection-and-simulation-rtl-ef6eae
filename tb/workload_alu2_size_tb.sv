// Workload testbench: a full fault campaign on a circuit of benchmark size
// (10 inputs, 8 outputs plus parity, 44 circuit LUTs + 47 parity-generator
// LUTs = 91 LUTs, the size of the alu2 benchmark). The benchmark's own
// netlist is not available, so a random circuit of that size is generated:
//   LUT 0..43   random 4-input LUTs over the inputs and earlier LUTs,
//               some inputs tied off; LUTs 36..43 drive outputs 0..7
//   LUT 44..87  the parity generator's copy of that logic
//   LUT 88..90  XOR tree of the copied outputs -> parity bit (output 8)
// The fault list is every LUT bit of every LUT that reaches an output,
// excluding bits addressed through a tied input. For each fault the class
// reported by the hardware must equal the class found by evaluating the
// network here (a separate evaluator walking the LUT list), the totals must
// agree, and the campaign must take f * (2**10 + 7) + (bits - f) + 2 clocks.
module workload_alu2_size_tb;
  import fte_pkg::*;

  localparam int N_IN   = 10;
  localparam int N_OUT  = 9;
  localparam int N_LUT  = 91;
  localparam int N_ORIG = 44;
  localparam int SELW   = $clog2(N_IN + N_LUT + 1);
  localparam int N_BITS = N_LUT * 16;
  localparam int IDXW   = $clog2(N_BITS + 1);
  localparam int NV     = 1 << N_IN;
  localparam logic [SELW-1:0] TIE = '1;

  logic clk = 0, rst, go, class_valid, busy, done;
  logic [N_LUT-1:0][15:0] cfg;
  logic [N_LUT-1:0][3:0][SELW-1:0] route;
  logic [N_OUT-1:0][SELW-1:0] osel;
  logic [N_BITS-1:0] fmask;
  logic [IDXW-1:0] fidx, ca, cb, cc, cd;
  fault_class_e fcls;
  logic [N_IN-1:0] pi_unused;
  logic [N_OUT-1:0] po1_unused, po2_unused;

  int checks = 0, failures = 0, reported = 0;
  int exp_cnt[4] = '{0, 0, 0, 0};
  logic [N_OUT-1:0] golden_res [NV];

  duplex_fault_emulation_top #(.N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT)) dut (
    .clk(clk), .rst(rst),
    .pi(pi_unused), .dx_lut_cfg1(cfg), .dx_lut_cfg2(cfg), .dx_route_cfg(route),
    .dx_out_sel(osel), .dx_reconf_done(1'b0), .po1(po1_unused), .po2(po2_unused),
    .dx_tsc1(), .dx_tsc2(), .dx_cmp1(), .dx_cmp2(),
    .dx_reconf_req(), .dx_sync_reset(), .dx_out_valid(), .dx_halt(),
    .em_lut_cfg(cfg), .em_route_cfg(route), .em_out_sel(osel), .em_fault_mask(fmask),
    .em_user_vector('0), .em_vector_select(1'b0), .em_go(go),
    .em_class_valid(class_valid), .em_fault_index(fidx), .em_fault_class(fcls),
    .em_cnt_a(ca), .em_cnt_b(cb), .em_cnt_c(cc), .em_cnt_d(cd), .em_busy(busy), .em_done(done));

  always #5 clk = ~clk;

  // Reference evaluator: walks the LUT list with its own signal table.
  function automatic logic [N_OUT-1:0] evaluate(logic [N_LUT-1:0][15:0] c, int x);
    logic s [N_IN + N_LUT];
    logic [N_OUT-1:0] r;
    for (int i = 0; i < N_IN; i++) s[i] = logic'((x >> i) & 1);
    for (int k = 0; k < N_LUT; k++) begin
      int a;
      a = 0;
      for (int j = 0; j < 4; j++)
        if (route[k][j] != TIE && s[route[k][j]]) a += (1 << j);
      s[N_IN + k] = c[k][a];
    end
    for (int o = 0; o < N_OUT; o++) r[o] = s[osel[o]];
    return r;
  endfunction

  function automatic int ref_class(int bit_index);
    logic [N_LUT-1:0][15:0] f;
    logic u, v;
    logic [N_OUT-1:0] r;
    f = cfg;
    f[bit_index / 16][bit_index % 16] = ~f[bit_index / 16][bit_index % 16];
    u = 0; v = 0;
    for (int x = 0; x < NV; x++) begin
      r = evaluate(f, x);
      if (r != golden_res[x]) begin
        if (^r) u = 1; else v = 1;
      end
    end
    return u ? (v ? 3 : 1) : (v ? 2 : 0);
  endfunction

  task automatic build_circuit();
    logic used [N_LUT];
    int src;
    for (int k = 0; k < N_ORIG; k++) begin
      cfg[k] = 16'($urandom);
      for (int j = 0; j < 4; j++) begin
        if (j >= 2 && ($urandom % 3) == 0) route[k][j] = TIE;
        else begin
          src = $urandom % (N_IN + k);
          route[k][j] = SELW'(src);
        end
      end
    end
    // parity generator: copy of the circuit, then an XOR tree of its outputs
    for (int k = 0; k < N_ORIG; k++) begin
      cfg[N_ORIG + k] = cfg[k];
      for (int j = 0; j < 4; j++) begin
        if (route[k][j] == TIE || route[k][j] < N_IN) route[N_ORIG + k][j] = route[k][j];
        else route[N_ORIG + k][j] = route[k][j] + SELW'(N_ORIG);
      end
    end
    for (int i = 0; i < 16; i++) begin
      cfg[88][i] = ^4'(i);
      cfg[89][i] = ^4'(i);
      cfg[90][i] = ^2'(i);
    end
    for (int j = 0; j < 4; j++) begin
      route[88][j] = SELW'(N_IN + N_ORIG + 36 + j);
      route[89][j] = SELW'(N_IN + N_ORIG + 40 + j);
    end
    route[90] = {TIE, TIE, SELW'(N_IN + 89), SELW'(N_IN + 88)};
    for (int o = 0; o < 8; o++) osel[o] = SELW'(N_IN + 36 + o);
    osel[8] = SELW'(N_IN + 90);
    // fault list: used bits of LUTs that reach an output
    for (int k = 0; k < N_LUT; k++) used[k] = 0;
    for (int o = 0; o < N_OUT; o++) used[osel[o] - N_IN] = 1;
    for (int k = N_LUT - 1; k >= 0; k--)
      if (used[k])
        for (int j = 0; j < 4; j++)
          if (route[k][j] != TIE && route[k][j] >= N_IN) used[route[k][j] - N_IN] = 1;
    fmask = '0;
    for (int k = 0; k < N_LUT; k++) begin
      if (!used[k]) continue;
      for (int b = 0; b < 16; b++) begin
        logic ok;
        ok = 1;
        for (int j = 0; j < 4; j++) if (route[k][j] == TIE && ((b >> j) & 1)) ok = 0;
        fmask[k * 16 + b] = ok;
      end
    end
  endtask

  always @(posedge clk) begin
    if (class_valid && !rst) begin
      int e;
      reported++;
      e = ref_class(int'(fidx));
      exp_cnt[e]++;
      checks++;
      if (int'(fcls) != e) begin failures++; $display("FAIL fault %0d class %0d expected %0d", fidx, fcls, e); end
    end
  end

  initial begin
    int cycles, f, expect_cycles;
    rst = 1; go = 0; pi_unused = '0;
    build_circuit();
    for (int x = 0; x < NV; x++) begin
      golden_res[x] = evaluate(cfg, x);
      checks++;
      if (^golden_res[x] !== 1'b0) begin failures++; $display("FAIL generated circuit not a code"); end
    end
    f = $countones(fmask);
    repeat (3) @(posedge clk); #1 rst = 0;
    @(posedge clk); #1 go = 1;
    @(posedge clk); #1 go = 0;
    cycles = 1;
    while (!done && cycles < 10_000_000) begin @(posedge clk); #1 cycles++; end
    expect_cycles = f * (NV + 7) + (N_BITS - f) + 2;
    checks += 3;
    if (reported != f) begin failures++; $display("FAIL %0d reported of %0d", reported, f); end
    if (int'(ca) != exp_cnt[0] || int'(cb) != exp_cnt[1] || int'(cc) != exp_cnt[2] || int'(cd) != exp_cnt[3]) begin
      failures++; $display("FAIL totals");
    end
    if (cycles != expect_cycles) begin failures++; $display("FAIL %0d clocks, expected %0d", cycles, expect_cycles); end
    $display("alu2-size campaign: %0d faults, A=%0d B=%0d C=%0d D=%0d, ST=%0.2f%% FS=%0.2f%%, %0d clocks",
             f, ca, cb, cc, cd, 100.0 * (cb + cd) / f, 100.0 * (ca + cb) / f, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
