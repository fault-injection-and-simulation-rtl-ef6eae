// Tested circuit: a feed-forward network of 4-input LUTs whose function is
// set entirely by configuration bits, as a circuit mapped into an SRAM FPGA.
//
// The benchmark circuit and its parity generator are both mapped into this
// network. Signal numbering: signals 0..N_IN-1 are the primary inputs,
// signal N_IN+k is the output of LUT k. Input j of LUT k takes signal
// route_cfg[k][j]; a select that does not name a primary input or an earlier
// LUT (>= N_IN+k) ties that LUT input to 0, which is how an unused LUT input
// is expressed. LUT k outputs lut_cfg[k][{i3,i2,i1,i0}]. Output o is signal
// out_sel[o]; a select beyond the last signal gives 0.
//
// A single-event upset in the LUT contents is modelled by flipping one bit of
// lut_cfg; the routing (interconnect) bits are kept fault-free, matching the
// "safe test set" of LUT faults that the emulator covers. The generic fabric
// is this design's way of holding the benchmarks, whose netlists are data.
// The default size holds the largest benchmark of the evaluation (18
// inputs, 25 outputs plus parity, 310 + 50 LUTs). Combinational.
module lut_fabric
  import fte_pkg::*;
#(
  parameter int unsigned N_IN  = 18,
  parameter int unsigned N_OUT = 26,
  parameter int unsigned N_LUT = 360,
  localparam int unsigned N_SIG = N_IN + N_LUT,
  localparam int unsigned SELW  = $clog2(N_SIG + 1)
) (
  input  logic [N_IN-1:0]                        in_vec,
  input  logic [N_LUT-1:0][LUT_BITS-1:0]         lut_cfg,
  input  logic [N_LUT-1:0][LUT_K-1:0][SELW-1:0]  route_cfg,
  input  logic [N_OUT-1:0][SELW-1:0]             out_sel,
  output logic [N_OUT-1:0]                       out_vec
);

  logic [N_SIG-1:0] sig;

  // Evaluate the LUTs in index order; LUT k only sees earlier signals, so
  // the network cannot contain a loop.
  always_comb begin
    logic [LUT_K-1:0] idx;
    sig           = '0;
    sig[N_IN-1:0] = in_vec;
    for (int unsigned k = 0; k < N_LUT; k++) begin
      for (int unsigned j = 0; j < LUT_K; j++) begin
        idx[j] = (int'(route_cfg[k][j]) < int'(N_IN + k)) ? sig[route_cfg[k][j]] : 1'b0;
      end
      sig[N_IN+k] = lut_cfg[k][idx];
    end
  end

  always_comb begin
    for (int unsigned o = 0; o < N_OUT; o++) begin
      out_vec[o] = (int'(out_sel[o]) < int'(N_SIG)) ? sig[out_sel[o]] : 1'b0;
    end
  end

endmodule
