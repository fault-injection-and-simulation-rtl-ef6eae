// One FPGA of the modified duplex system.
//
// It holds the TSC circuit, i.e. the application circuit mapped into LUTs
// together with its parity generator (so its result is a code word of even
// parity), and the TSC parity checker of that result, whose OK/FAIL pair
// reports whether this FPGA's own output looks correct. Its comparator
// checks the primary output against the other FPGA's primary output and
// gives a second OK/FAIL pair (OK = equal). Both pairs go to the
// reconfiguration unit. The circuit contents arrive as configuration bits,
// which an upset may corrupt. Structure per the duplex architecture;
// comparing the whole result, parity bit included, is this design's choice.
// Combinational.
module fpga_tsc_unit
  import fte_pkg::*;
#(
  parameter int unsigned N_IN  = 18,
  parameter int unsigned N_OUT = 26,
  parameter int unsigned N_LUT = 360,
  localparam int unsigned SELW = $clog2(N_IN + N_LUT + 1)
) (
  input  logic [N_IN-1:0]                       pi,
  input  logic [N_LUT-1:0][LUT_BITS-1:0]        lut_cfg,
  input  logic [N_LUT-1:0][LUT_K-1:0][SELW-1:0] route_cfg,
  input  logic [N_OUT-1:0][SELW-1:0]            out_sel,
  input  logic [N_OUT-1:0]                      other_po,
  output logic [N_OUT-1:0]                      po,
  output two_rail_t                             tsc,
  output two_rail_t                             cmp
);

  logic unused_equal;

  lut_fabric #(.N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT)) u_circuit (
    .in_vec   (pi),
    .lut_cfg  (lut_cfg),
    .route_cfg(route_cfg),
    .out_sel  (out_sel),
    .out_vec  (po)
  );

  tsc_checker #(.WIDTH(N_OUT)) u_checker (
    .code_in(po),
    .check  (tsc)
  );

  comparator #(.WIDTH(N_OUT)) u_comparator (
    .r    (po),
    .s    (other_po),
    .equal(unused_equal),
    .cmp  (cmp)
  );

endmodule
