// Hardware fault emulator: the benchmark test structure.
//
// Two copies of the tested circuit see the same registered test vector.
// Copy 1 carries the configuration with the injected fault, copy 2 the
// fault-free one. Their results (circuit outputs plus predicted parity bit)
// are registered; a parity checker judges the faulty result and a comparator
// matches it against the fault-free one. Per vector:
//   detected error   (U) = results differ and the checker rejects the word
//   undetected error (V) = results differ and the checker accepts the word
// Two one-bit counters remember whether U or V ever occurred during the
// test, which is enough to place the fault in class A, B, C or D.
//
// The vector comes from the exhaustive test generator, or from user_vector
// when vector_select = 1. Pipeline: generator -> vector DFF -> circuits ->
// result DFFs -> checker/comparator/U/V -> counters, so u and v are final
// when finish rises (generator LATENCY = 3). One vector per clock.
// The configurations must be stable from two clocks before start to finish.
// Block structure, port names and the pipeline registers follow the
// documented test structure; the U and V equations are this design's
// reading of the class definitions.
module fault_emulator
  import fte_pkg::*;
#(
  parameter int unsigned N_IN  = 18,
  parameter int unsigned N_OUT = 26,
  parameter int unsigned N_LUT = 360,
  localparam int unsigned SELW = $clog2(N_IN + N_LUT + 1)
) (
  input  logic                                  clk,
  input  logic                                  sreset,
  input  logic                                  start,
  input  logic [N_IN-1:0]                       user_vector,
  input  logic                                  vector_select,
  input  logic [N_LUT-1:0][LUT_BITS-1:0]        lut_cfg_fault,
  input  logic [N_LUT-1:0][LUT_BITS-1:0]        lut_cfg_golden,
  input  logic [N_LUT-1:0][LUT_K-1:0][SELW-1:0] route_cfg,
  input  logic [N_OUT-1:0][SELW-1:0]            out_sel,
  output logic                                  finish,
  output logic                                  u,
  output logic                                  v
);

  logic [N_IN-1:0]  gen_vector, vec_d, vec_q;
  logic [N_OUT-1:0] res1_d, res2_d, res1_q, res2_q;
  logic             codeword, equal, ev_u, ev_v;
  two_rail_t        chk, cmp_tr;

  test_generator #(.N_IN(N_IN), .LATENCY(3)) u_gen (
    .clk        (clk),
    .sreset     (sreset),
    .start      (start),
    .test_vector(gen_vector),
    .finish     (finish)
  );

  assign vec_d = vector_select ? user_vector : gen_vector;

  always_ff @(posedge clk) begin
    vec_q  <= vec_d;
    res1_q <= res1_d;
    res2_q <= res2_d;
  end

  lut_fabric #(.N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT)) u_tested1 (
    .in_vec   (vec_q),
    .lut_cfg  (lut_cfg_fault),
    .route_cfg(route_cfg),
    .out_sel  (out_sel),
    .out_vec  (res1_d)
  );

  lut_fabric #(.N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT)) u_tested2 (
    .in_vec   (vec_q),
    .lut_cfg  (lut_cfg_golden),
    .route_cfg(route_cfg),
    .out_sel  (out_sel),
    .out_vec  (res2_d)
  );

  // Non-TSC checker and comparator: only the OK rails are used here.
  tsc_checker #(.WIDTH(N_OUT)) u_checker (
    .code_in(res1_q),
    .check  (chk)
  );

  comparator #(.WIDTH(N_OUT)) u_comparator (
    .r    (res1_q),
    .s    (res2_q),
    .equal(equal),
    .cmp  (cmp_tr)
  );

  assign codeword = chk.ok;
  assign ev_u     = !equal && !codeword;
  assign ev_v     = !equal &&  codeword;

  sum1bit u_sum_u (.clk(clk), .sreset(sreset), .start(start), .in(ev_u), .sum(u));
  sum1bit u_sum_v (.clk(clk), .sreset(sreset), .start(start), .in(ev_v), .sum(v));

endmodule
