// Self-checking testbench of lut_fabric: the example circuit is loaded and
// all 16 vectors are compared with the explicit reference, first fault-free
// and then with 30 random single-bit LUT upsets; an output select beyond the
// last signal must read 0.
module lut_fabric_tb;
  import tb_example_pkg::*;
  logic [3:0] x;
  ex_cfg_t    cfg;
  ex_route_t  route;
  ex_osel_t   osel;
  logic [3:0] y;
  int checks = 0, failures = 0;

  lut_fabric #(.N_IN(EX_N_IN), .N_OUT(EX_N_OUT), .N_LUT(EX_N_LUT)) dut (
    .in_vec(x), .lut_cfg(cfg), .route_cfg(route), .out_sel(osel), .out_vec(y));

  task automatic sweep(string what);
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      checks++;
      if (y !== ref_eval(cfg, x)) begin
        failures++;
        $display("FAIL %s x=%h y=%b ref=%b", what, x, y, ref_eval(cfg, x));
      end
    end
  endtask

  initial begin
    cfg = golden_cfg(); route = golden_route(); osel = golden_osel();
    sweep("golden");
    // the example's fault-free result must be a 3-bit sum with even parity
    for (int v = 0; v < 16; v++) begin
      x = 4'(v); #1;
      checks++;
      if (^y !== 1'b0) begin failures++; $display("FAIL parity x=%h", x); end
    end
    for (int f = 0; f < 30; f++) begin
      int b;
      b = $urandom % (EX_N_LUT * 16);
      cfg = golden_cfg();
      cfg[b / 16][b % 16] = ~cfg[b / 16][b % 16];
      sweep("fault");
    end
    cfg = golden_cfg();
    osel[3] = 4'd15;
    x = 4'hF; #1;
    checks++;
    if (y[3] !== 1'b0) begin failures++; $display("FAIL out-of-range select"); end
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
