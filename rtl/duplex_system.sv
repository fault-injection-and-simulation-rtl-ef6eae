// Modified duplex system: two FPGAs with TSC circuits, cross comparison and
// a reconfiguration unit.
//
// Both FPGAs receive the same primary input and carry the same circuit, each
// from its own configuration memory (lut_cfg1, lut_cfg2), so an upset hits
// one copy only; the routing configuration is shared. Each FPGA compares its
// output with the other's. The reconfiguration unit combines the two
// self-checking reports with the two comparisons to locate the faulty FPGA,
// requests its reconfiguration through reconf_req/reconf_done (the
// configuration port itself lies outside this RTL) and resynchronises both
// with sync_reset. po1/po2 are the two primary outputs; out_valid says
// which of them can be trusted. Structure per the duplex architecture.
// The FPGA parts are combinational; the unit adds a registered decision.
module duplex_system
  import fte_pkg::*;
#(
  parameter int unsigned N_IN  = 18,
  parameter int unsigned N_OUT = 26,
  parameter int unsigned N_LUT = 360,
  localparam int unsigned SELW = $clog2(N_IN + N_LUT + 1)
) (
  input  logic                                  clk,
  input  logic                                  rst,
  input  logic [N_IN-1:0]                       pi,
  input  logic [N_LUT-1:0][LUT_BITS-1:0]        lut_cfg1,
  input  logic [N_LUT-1:0][LUT_BITS-1:0]        lut_cfg2,
  input  logic [N_LUT-1:0][LUT_K-1:0][SELW-1:0] route_cfg,
  input  logic [N_OUT-1:0][SELW-1:0]            out_sel,
  input  logic                                  reconf_done,
  output logic [N_OUT-1:0]                      po1,
  output logic [N_OUT-1:0]                      po2,
  output two_rail_t                             tsc1,
  output two_rail_t                             tsc2,
  output two_rail_t                             cmp1,
  output two_rail_t                             cmp2,
  output logic [1:0]                            reconf_req,
  output logic                                  sync_reset,
  output logic [1:0]                            out_valid,
  output logic                                  halt
);

  fpga_tsc_unit #(.N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT)) u_fpga1 (
    .pi       (pi),
    .lut_cfg  (lut_cfg1),
    .route_cfg(route_cfg),
    .out_sel  (out_sel),
    .other_po (po2),
    .po       (po1),
    .tsc      (tsc1),
    .cmp      (cmp1)
  );

  fpga_tsc_unit #(.N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT)) u_fpga2 (
    .pi       (pi),
    .lut_cfg  (lut_cfg2),
    .route_cfg(route_cfg),
    .out_sel  (out_sel),
    .other_po (po1),
    .po       (po2),
    .tsc      (tsc2),
    .cmp      (cmp2)
  );

  reconfig_unit u_reconfig (
    .clk        (clk),
    .rst        (rst),
    .tsc1       (tsc1),
    .tsc2       (tsc2),
    .cmp1       (cmp1),
    .cmp2       (cmp2),
    .reconf_done(reconf_done),
    .reconf_req (reconf_req),
    .sync_reset (sync_reset),
    .out_valid  (out_valid),
    .halt       (halt)
  );

endmodule
