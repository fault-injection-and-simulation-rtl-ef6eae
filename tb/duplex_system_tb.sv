// Self-checking testbench of duplex_system on the example circuit (4 inputs,
// 4 outputs, 6 LUTs). Each trial upsets one random LUT bit in FPGA 1,
// FPGA 2 or neither and applies random inputs. Every clock the two primary
// outputs, the four OK/FAIL pairs, out_valid, halt and the registered
// reconfiguration request are compared with a reference worked out from the
// explicit netlist. A model of the configuration port reloads the requested
// FPGAs and acknowledges; the one-clock resynchronisation must follow.
// Each decision (FPGA 1, FPGA 2, both with halt) must occur.
module duplex_system_tb;
  import fte_pkg::*;
  import tb_example_pkg::*;
  logic clk = 0, rst, reconf_done, sync_reset, halt;
  logic [3:0] pi, po1, po2;
  ex_cfg_t cfg1, cfg2;
  ex_route_t route;
  ex_osel_t osel;
  two_rail_t tsc1, tsc2, cmp1, cmp2;
  logic [1:0] req, valid;
  int checks = 0, failures = 0, n_re1 = 0, n_re2 = 0, n_both = 0;

  duplex_system #(.N_IN(EX_N_IN), .N_OUT(EX_N_OUT), .N_LUT(EX_N_LUT)) dut (
    .clk(clk), .rst(rst), .pi(pi), .lut_cfg1(cfg1), .lut_cfg2(cfg2),
    .route_cfg(route), .out_sel(osel), .reconf_done(reconf_done),
    .po1(po1), .po2(po2), .tsc1(tsc1), .tsc2(tsc2), .cmp1(cmp1), .cmp2(cmp2),
    .reconf_req(req), .sync_reset(sync_reset), .out_valid(valid), .halt(halt));

  always #5 clk = ~clk;

  initial begin
    rst = 1; reconf_done = 0; pi = '0;
    cfg1 = golden_cfg(); cfg2 = golden_cfg(); route = golden_route(); osel = golden_osel();
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 300; t++) begin
      int which, b;
      which = $urandom % 3;
      b = $urandom % (EX_N_LUT * 16);
      if (which == 1) cfg1[b / 16][b % 16] = ~cfg1[b / 16][b % 16];
      if (which == 2) cfg2[b / 16][b % 16] = ~cfg2[b / 16][b % 16];
      for (int c = 0; c < 12; c++) begin
        logic [3:0] r1, r2;
        logic e1, e2, d;
        logic [1:0] exp;
        pi = 4'($urandom);
        #1;
        r1 = ref_eval(cfg1, pi);
        r2 = ref_eval(cfg2, pi);
        e1 = ^r1; e2 = ^r2; d = r1 != r2;
        if (!d) exp = {e2, e1};
        else if (e1 && !e2) exp = 2'b01;
        else if (e2 && !e1) exp = 2'b10;
        else exp = 2'b11;
        checks += 7;
        if (po1 !== r1 || po2 !== r2) begin failures++; $display("FAIL outputs"); end
        if (tsc1 !== '{ok: !e1, fail: e1}) begin failures++; $display("FAIL tsc1=%b", tsc1); end
        if (tsc2 !== '{ok: !e2, fail: e2}) begin failures++; $display("FAIL tsc2=%b", tsc2); end
        if (cmp1 !== '{ok: !d, fail: d}) begin failures++; $display("FAIL cmp1=%b", cmp1); end
        if (cmp2 !== '{ok: !d, fail: d}) begin failures++; $display("FAIL cmp2=%b", cmp2); end
        if (valid !== ~exp) begin failures++; $display("FAIL out_valid=%b exp %b", valid, ~exp); end
        if (halt !== (exp == 2'b11)) begin failures++; $display("FAIL halt"); end
        @(posedge clk); #1;
        checks++;
        if (req !== exp) begin failures++; $display("FAIL req=%b exp %b", req, exp); end
        if (exp != 2'b00) begin
          if (exp == 2'b01) n_re1++;
          if (exp == 2'b10) n_re2++;
          if (exp == 2'b11) n_both++;
          if (exp[0]) cfg1 = golden_cfg();
          if (exp[1]) cfg2 = golden_cfg();
          @(posedge clk);
          #1 reconf_done = 1;
          @(posedge clk); #1 reconf_done = 0;
          checks++;
          if (!sync_reset || !halt) begin failures++; $display("FAIL no resynchronisation"); end
          @(posedge clk); #1;
          checks++;
          if (sync_reset || req != 2'b00) begin failures++; $display("FAIL not back to running"); end
          break;
        end
      end
      cfg1 = golden_cfg();
      cfg2 = golden_cfg();
    end
    checks++;
    if (n_re1 == 0 || n_re2 == 0 || n_both == 0) begin
      failures++; $display("FAIL decisions seen: %0d %0d %0d", n_re1, n_re2, n_both);
    end
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
