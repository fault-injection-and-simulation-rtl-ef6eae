// Reconfiguration unit of the modified duplex system.
//
// Inputs are four OK/FAIL pairs: the TSC checkers of FPGA 1 and 2 and the
// comparators in FPGA 1 and 2. A pair other than {OK=1, FAIL=0} counts as an
// error report. While running, every clock is judged:
//   outputs differ, exactly one TSC reports an error -> that FPGA is faulty
//   outputs differ, neither (or both) TSC reports    -> halt, both are faulty
//   outputs agree, a TSC reports an error            -> that FPGA is faulty
// The decision is registered in reconf_req (bit i = FPGA i+1), which stays
// high until reconf_done, the configuration port's acknowledgement. Then
// sync_reset is pulsed for one clock to bring both FPGAs back into step and
// the unit runs again. out_valid marks the primary outputs that may be used
// (the fault-free FPGA keeps serving while the other is reconfigured); halt
// is high when none may. rst is synchronous.
// The first two decision rows, the halt and the resynchronisation follow the
// documented duplex scheme; the third row, the handshake and the encoding
// are this design's.
module reconfig_unit
  import fte_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  two_rail_t  tsc1,
  input  two_rail_t  tsc2,
  input  two_rail_t  cmp1,
  input  two_rail_t  cmp2,
  input  logic       reconf_done,
  output logic [1:0] reconf_req,
  output logic       sync_reset,
  output logic [1:0] out_valid,
  output logic       halt
);

  typedef enum logic [1:0] {R_RUN, R_RECONF, R_SYNC} rstate_e;

  rstate_e    state;
  logic       err1, err2, diff;
  logic [1:0] target;

  assign err1 = !tr_good(tsc1);
  assign err2 = !tr_good(tsc2);
  assign diff = !tr_good(cmp1) || !tr_good(cmp2);

  always_comb begin
    if (diff) begin
      if (err1 && !err2)      target = 2'b01;
      else if (err2 && !err1) target = 2'b10;
      else                    target = 2'b11;
    end else begin
      target = {err2, err1};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= R_RUN;
      reconf_req <= 2'b00;
    end else begin
      unique case (state)
        R_RUN: begin
          if (target != 2'b00) begin
            reconf_req <= target;
            state      <= R_RECONF;
          end
        end
        R_RECONF: begin
          if (reconf_done) begin
            reconf_req <= 2'b00;
            state      <= R_SYNC;
          end
        end
        R_SYNC:  state <= R_RUN;
        default: state <= R_RUN;
      endcase
    end
  end

  assign sync_reset = (state == R_SYNC);

  always_comb begin
    unique case (state)
      R_RUN:    out_valid = ~target;
      R_RECONF: out_valid = ~reconf_req;
      default:  out_valid = 2'b00;
    endcase
  end

  assign halt = (out_valid == 2'b00);

  // A request is never dropped before it is acknowledged.
  assert property (@(posedge clk) disable iff (rst)
                   (state == R_RECONF && !reconf_done) |=> (reconf_req != 2'b00))
    else $error("reconfig_unit: request dropped without reconf_done");

endmodule
