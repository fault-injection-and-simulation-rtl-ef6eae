// Example tested circuit for the testbenches, with an independent reference.
//
// Four inputs x0..x3, six 4-input LUTs, three outputs plus a parity bit:
//   LUT0 g  = x0 & x1          inputs (x0, x1, -, -)
//   LUT1 h  = x2 | x3          inputs (x2, x3, -, -)
//   LUT2 o0 = g ^ h            inputs (g, h, x0, -)   x0 wired but unused
//   LUT3 o1 = g & x2           inputs (g, x2, -, -)
//   LUT4 o2 = h ^ x1           inputs (h, x1, -, -)
//   LUT5 p  = o0 ^ o1 ^ o2     computed directly from x0..x3 (parity predictor)
// Result word = {p, o2, o1, o0}, a code word of even parity.
// The shape gives every fault class: upsets in LUT2 where g=1 and x0=0
// can never be reached (A), LUT5 and LUT3 upsets flip one bit (B), LUT1
// upsets flip o0 and o2 together (C), LUT0 upsets flip o0 always and o1
// only when x2 = 1 (D).
// ref_eval() evaluates this netlist from a LUT configuration by naming each
// LUT explicitly, without the generic routing of the fabric under test.
package tb_example_pkg;

  localparam int unsigned EX_N_IN  = 4;
  localparam int unsigned EX_N_OUT = 4;
  localparam int unsigned EX_N_LUT = 6;
  localparam int unsigned EX_SELW  = 4;          // $clog2(4 + 6 + 1)
  localparam logic [3:0]  TIE      = 4'd15;      // select of an unused input

  typedef logic [EX_N_LUT-1:0][15:0]          ex_cfg_t;
  typedef logic [EX_N_LUT-1:0][3:0][3:0]      ex_route_t;
  typedef logic [EX_N_OUT-1:0][3:0]           ex_osel_t;

  function automatic logic [15:0] table_of(int unsigned f);
    logic [15:0] t;
    for (int i = 0; i < 16; i++) begin
      logic a, b, c, d;
      {d, c, b, a} = 4'(i);
      unique case (f)
        0: t[i] = a & b;
        1: t[i] = a | b;
        2: t[i] = a ^ b;
        3: t[i] = a & b;
        4: t[i] = a ^ b;
        default: t[i] = ((a & b) ^ (c | d)) ^ (a & b & c) ^ ((c | d) ^ b);
      endcase
    end
    return t;
  endfunction

  function automatic ex_cfg_t golden_cfg();
    ex_cfg_t c;
    for (int k = 0; k < 6; k++) c[k] = table_of(k);
    return c;
  endfunction

  function automatic ex_route_t golden_route();
    ex_route_t r;
    r[0] = {TIE,  TIE,  4'd1, 4'd0};
    r[1] = {TIE,  TIE,  4'd3, 4'd2};
    r[2] = {TIE,  4'd0, 4'd5, 4'd4};
    r[3] = {TIE,  TIE,  4'd2, 4'd4};
    r[4] = {TIE,  TIE,  4'd1, 4'd5};
    r[5] = {4'd3, 4'd2, 4'd1, 4'd0};
    return r;
  endfunction

  function automatic ex_osel_t golden_osel();
    return {4'd9, 4'd8, 4'd7, 4'd6};
  endfunction

  // LUT bits that can be upset: those not addressed through a tied input.
  function automatic logic [EX_N_LUT*16-1:0] used_mask();
    logic [EX_N_LUT*16-1:0] m;
    m = '0;
    for (int i = 0; i < 4; i++) begin
      m[0*16+i] = 1'b1; m[1*16+i] = 1'b1; m[3*16+i] = 1'b1; m[4*16+i] = 1'b1;
    end
    for (int i = 0; i < 8; i++)  m[2*16+i] = 1'b1;
    for (int i = 0; i < 16; i++) m[5*16+i] = 1'b1;
    return m;
  endfunction

  function automatic logic [3:0] ref_eval(ex_cfg_t c, logic [3:0] x);
    logic g, h, o0, o1, o2, p;
    g  = c[0][{2'b00, x[1], x[0]}];
    h  = c[1][{2'b00, x[3], x[2]}];
    o0 = c[2][{1'b0, x[0], h, g}];
    o1 = c[3][{2'b00, x[2], g}];
    o2 = c[4][{2'b00, x[1], h}];
    p  = c[5][x];
    return {p, o2, o1, o0};
  endfunction

  // Class of a faulty configuration: 0=A 1=B 2=C 3=D (u = detected seen,
  // v = undetected seen), from all 16 vectors.
  function automatic int ref_class(ex_cfg_t faulty);
    ex_cfg_t gc;
    logic u, v;
    logic [3:0] rf, rg;
    gc = golden_cfg();
    u = 1'b0;
    v = 1'b0;
    for (int x = 0; x < 16; x++) begin
      rf = ref_eval(faulty, 4'(x));
      rg = ref_eval(gc, 4'(x));
      if (rf != rg) begin
        if (^rf) u = 1'b1;   // odd parity: checker rejects
        else     v = 1'b1;
      end
    end
    return u ? (v ? 3 : 1) : (v ? 2 : 0);
  endfunction

endpackage
