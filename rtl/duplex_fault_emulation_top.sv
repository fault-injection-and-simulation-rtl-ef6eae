// Top level: the fault-tolerant duplex system and the hardware fault
// emulator that measures how well its TSC circuit detects LUT upsets.
//
// Left half, duplex system: primary input 'pi' drives two copies of the
// TSC circuit (configurations dx_lut_cfg1/2, shared dx_route_cfg and
// dx_out_sel); the two primary outputs, the self-check and comparison
// reports and the reconfiguration handshake are brought out.
// Right half, fault emulator: em_lut_cfg is the fault-free configuration of
// the circuit under test. The campaign sequencer, started by em_go, injects
// each bit of em_fault_mask in turn as a single flipped LUT bit (faulty
// configuration = em_lut_cfg XOR flip), runs an exhaustive test per fault and
// reports each fault's class and the A/B/C/D totals. em_user_vector with
// em_vector_select = 1 replaces the generated vectors. Both halves share clk
// and the synchronous reset rst. The pairing of the two halves follows the
// described work; that they share nothing but the clock is this design's.
module duplex_fault_emulation_top
  import fte_pkg::*;
#(
  parameter int unsigned N_IN   = 18,
  parameter int unsigned N_OUT  = 26,
  parameter int unsigned N_LUT  = 360,
  localparam int unsigned SELW   = $clog2(N_IN + N_LUT + 1),
  localparam int unsigned N_BITS = N_LUT * LUT_BITS,
  localparam int unsigned IDXW   = $clog2(N_BITS + 1)
) (
  input  logic                                  clk,
  input  logic                                  rst,
  // duplex system
  input  logic [N_IN-1:0]                       pi,
  input  logic [N_LUT-1:0][LUT_BITS-1:0]        dx_lut_cfg1,
  input  logic [N_LUT-1:0][LUT_BITS-1:0]        dx_lut_cfg2,
  input  logic [N_LUT-1:0][LUT_K-1:0][SELW-1:0] dx_route_cfg,
  input  logic [N_OUT-1:0][SELW-1:0]            dx_out_sel,
  input  logic                                  dx_reconf_done,
  output logic [N_OUT-1:0]                      po1,
  output logic [N_OUT-1:0]                      po2,
  output two_rail_t                             dx_tsc1,
  output two_rail_t                             dx_tsc2,
  output two_rail_t                             dx_cmp1,
  output two_rail_t                             dx_cmp2,
  output logic [1:0]                            dx_reconf_req,
  output logic                                  dx_sync_reset,
  output logic [1:0]                            dx_out_valid,
  output logic                                  dx_halt,
  // fault emulator
  input  logic [N_LUT-1:0][LUT_BITS-1:0]        em_lut_cfg,
  input  logic [N_LUT-1:0][LUT_K-1:0][SELW-1:0] em_route_cfg,
  input  logic [N_OUT-1:0][SELW-1:0]            em_out_sel,
  input  logic [N_BITS-1:0]                     em_fault_mask,
  input  logic [N_IN-1:0]                       em_user_vector,
  input  logic                                  em_vector_select,
  input  logic                                  em_go,
  output logic                                  em_class_valid,
  output logic [IDXW-1:0]                       em_fault_index,
  output fault_class_e                          em_fault_class,
  output logic [IDXW-1:0]                       em_cnt_a,
  output logic [IDXW-1:0]                       em_cnt_b,
  output logic [IDXW-1:0]                       em_cnt_c,
  output logic [IDXW-1:0]                       em_cnt_d,
  output logic                                  em_busy,
  output logic                                  em_done
);

  duplex_system #(.N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT)) u_duplex (
    .clk        (clk),
    .rst        (rst),
    .pi         (pi),
    .lut_cfg1   (dx_lut_cfg1),
    .lut_cfg2   (dx_lut_cfg2),
    .route_cfg  (dx_route_cfg),
    .out_sel    (dx_out_sel),
    .reconf_done(dx_reconf_done),
    .po1        (po1),
    .po2        (po2),
    .tsc1       (dx_tsc1),
    .tsc2       (dx_tsc2),
    .cmp1       (dx_cmp1),
    .cmp2       (dx_cmp2),
    .reconf_req (dx_reconf_req),
    .sync_reset (dx_sync_reset),
    .out_valid  (dx_out_valid),
    .halt       (dx_halt)
  );

  logic [N_BITS-1:0] fault_flip;
  logic [N_LUT-1:0][LUT_BITS-1:0] em_lut_cfg_fault;
  logic emu_start, emu_finish, emu_u, emu_v;

  assign em_lut_cfg_fault = em_lut_cfg ^ fault_flip;

  fault_emulator #(.N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT)) u_emulator (
    .clk           (clk),
    .sreset        (rst),
    .start         (emu_start),
    .user_vector   (em_user_vector),
    .vector_select (em_vector_select),
    .lut_cfg_fault (em_lut_cfg_fault),
    .lut_cfg_golden(em_lut_cfg),
    .route_cfg     (em_route_cfg),
    .out_sel       (em_out_sel),
    .finish        (emu_finish),
    .u             (emu_u),
    .v             (emu_v)
  );

  fault_campaign #(.N_BITS(N_BITS)) u_campaign (
    .clk        (clk),
    .rst        (rst),
    .go         (em_go),
    .fault_mask (em_fault_mask),
    .fault_flip (fault_flip),
    .emu_start  (emu_start),
    .emu_finish (emu_finish),
    .emu_u      (emu_u),
    .emu_v      (emu_v),
    .class_valid(em_class_valid),
    .fault_index(em_fault_index),
    .fault_class(em_fault_class),
    .cnt_a      (em_cnt_a),
    .cnt_b      (em_cnt_b),
    .cnt_c      (em_cnt_c),
    .cnt_d      (em_cnt_d),
    .busy       (em_busy),
    .done       (em_done)
  );

endmodule
