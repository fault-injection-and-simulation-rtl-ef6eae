// Self-checking testbench of fpga_tsc_unit on the example circuit: the
// primary output must match the reference, the TSC pair must report the
// parity of that output, and the comparator pair must report whether it
// equals the other FPGA's output, for the fault-free circuit and for random
// single LUT upsets.
module fpga_tsc_unit_tb;
  import fte_pkg::*;
  import tb_example_pkg::*;
  logic [3:0] pi, other, po;
  ex_cfg_t    cfg;
  ex_route_t  route;
  ex_osel_t   osel;
  two_rail_t  tsc, cmp;
  int checks = 0, failures = 0, tsc_errors = 0, cmp_errors = 0;

  fpga_tsc_unit #(.N_IN(EX_N_IN), .N_OUT(EX_N_OUT), .N_LUT(EX_N_LUT)) dut (
    .pi(pi), .lut_cfg(cfg), .route_cfg(route), .out_sel(osel),
    .other_po(other), .po(po), .tsc(tsc), .cmp(cmp));

  initial begin
    route = golden_route(); osel = golden_osel();
    for (int t = 0; t < 400; t++) begin
      logic [3:0] exp;
      logic       cw;
      cfg = golden_cfg();
      if (t >= 50) begin
        int b;
        b = $urandom % (EX_N_LUT * 16);
        cfg[b / 16][b % 16] = ~cfg[b / 16][b % 16];
      end
      pi = 4'($urandom);
      exp = ref_eval(cfg, pi);
      other = ($urandom % 2) ? ref_eval(golden_cfg(), pi) : 4'($urandom);
      #1;
      cw = ~^exp;
      checks += 3;
      if (po !== exp) begin failures++; $display("FAIL po=%b exp=%b", po, exp); end
      if (tsc !== '{ok: cw, fail: !cw}) begin failures++; $display("FAIL tsc=%b for %b", tsc, po); end
      if (cmp !== '{ok: exp == other, fail: exp != other}) begin
        failures++; $display("FAIL cmp=%b po=%b other=%b", cmp, po, other);
      end
      if (!cw) tsc_errors++;
      if (exp != other) cmp_errors++;
    end
    checks++;
    if (tsc_errors == 0 || cmp_errors == 0) begin failures++; $display("FAIL no error reports exercised"); end
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
