// Self-checking testbench of fault_emulator on the example circuit: every
// upsettable LUT bit is injected in turn, one exhaustive test is run per
// fault, and the u/v counters must match the class computed by the
// reference. Also checks the test time (finish exactly 2**4 + 2 clocks
// after the start edge, i.e. one vector per clock) and the user-vector path
// of the input multiplexer.
module fault_emulator_tb;
  import tb_example_pkg::*;
  logic       clk = 0, sreset, start, vsel, finish, u, v;
  logic [3:0] uvec;
  ex_cfg_t    cfg_f, cfg_g;
  ex_route_t  route;
  ex_osel_t   osel;
  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};
  logic [EX_N_LUT*16-1:0] mask;

  fault_emulator #(.N_IN(EX_N_IN), .N_OUT(EX_N_OUT), .N_LUT(EX_N_LUT)) dut (
    .clk(clk), .sreset(sreset), .start(start), .user_vector(uvec),
    .vector_select(vsel), .lut_cfg_fault(cfg_f), .lut_cfg_golden(cfg_g),
    .route_cfg(route), .out_sel(osel), .finish(finish), .u(u), .v(v));

  always #5 clk = ~clk;

  // Run one test; returns the number of clocks from the start edge to finish.
  task automatic run_test(output int clocks);
    repeat (2) @(posedge clk);
    #1 start = 1;
    @(posedge clk); #1 start = 0;
    clocks = 0;
    while (!finish && clocks < 100) begin @(posedge clk); #1 clocks++; end
  endtask

  initial begin
    int clocks, exp_cls;
    sreset = 1; start = 0; vsel = 0; uvec = '0;
    cfg_g = golden_cfg(); cfg_f = golden_cfg(); route = golden_route(); osel = golden_osel();
    mask = used_mask();
    repeat (2) @(posedge clk); #1 sreset = 0;
    for (int b = 0; b < EX_N_LUT * 16; b++) begin
      if (!mask[b]) continue;
      cfg_f = golden_cfg();
      cfg_f[b / 16][b % 16] = ~cfg_f[b / 16][b % 16];
      run_test(clocks);
      exp_cls = ref_class(cfg_f);
      seen[exp_cls]++;
      checks += 2;
      if (clocks != 16 + 2) begin failures++; $display("FAIL test took %0d clocks", clocks); end
      if ({u, v} !== {exp_cls == 1 || exp_cls == 3, exp_cls == 2 || exp_cls == 3}) begin
        failures++;
        $display("FAIL bit %0d: u=%b v=%b expected class %0d", b, u, v, exp_cls);
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL class %0d never produced", c); end
    end
    // User vector: LUT0 bit 3 (x0 = x1 = 1) upset. Vector 4'b0011 exposes it
    // as a detected error (x2 = 0); vector 4'b0100 never reaches it.
    cfg_f = golden_cfg();
    cfg_f[0][3] = ~cfg_f[0][3];
    vsel = 1;
    uvec = 4'b0011;
    run_test(clocks);
    checks++;
    if ({u, v} !== 2'b10) begin failures++; $display("FAIL user vector 3: u=%b v=%b", u, v); end
    uvec = 4'b0100;
    run_test(clocks);
    checks++;
    if ({u, v} !== 2'b00) begin failures++; $display("FAIL user vector 4: u=%b v=%b", u, v); end
    $display("classes A=%0d B=%0d C=%0d D=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
