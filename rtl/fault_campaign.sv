// Fault-injection campaign sequencer for the hardware fault emulator.
//
// It plays the role of the controlling processor: for every LUT
// configuration bit marked in fault_mask (the used parts of the used LUTs)
// it uploads that single bit flip as the fault (the one-hot fault_flip, which
// XORed with the fault-free bitstream gives the faulty one; moving to the
// next fault automatically restores the previous bit), lets it settle for two
// clocks, pulses emu_start, waits for emu_finish, and reads the emulator's
// two one-bit counters. u/v = 00 -> class A (hidden), 10 -> B (detected),
// 01 -> C (undetected), 11 -> D (temporarily detected). Each result is
// reported on class_valid/fault_index/fault_class and counted.
// Total time is f * (2**N_IN + 7) clocks plus one clock per unmasked
// bit, so the v * f iterations take one clock each.
// Handshake: pulse 'go' in IDLE; 'busy' is high until 'done' rises, and
// 'done' stays high until the next 'go'. rst is synchronous.
// The per-fault procedure follows the documented emulator flow; the state
// machine, the settle time and the counter widths are this design's.
module fault_campaign
  import fte_pkg::*;
#(
  parameter int unsigned N_BITS = 360 * LUT_BITS,
  localparam int unsigned IDXW  = $clog2(N_BITS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              go,
  input  logic [N_BITS-1:0] fault_mask,
  output logic [N_BITS-1:0] fault_flip,
  output logic              emu_start,
  input  logic              emu_finish,
  input  logic              emu_u,
  input  logic              emu_v,
  output logic              class_valid,
  output logic [IDXW-1:0]   fault_index,
  output fault_class_e      fault_class,
  output logic [IDXW-1:0]   cnt_a,
  output logic [IDXW-1:0]   cnt_b,
  output logic [IDXW-1:0]   cnt_c,
  output logic [IDXW-1:0]   cnt_d,
  output logic              busy,
  output logic              done
);

  typedef enum logic [2:0] {
    S_IDLE, S_SCAN, S_SETTLE, S_START, S_WAIT, S_DONE
  } state_e;

  state_e          state;
  logic [IDXW-1:0] idx;
  logic            settle;
  fault_class_e    cls;

  assign cls       = classify(emu_u, emu_v);
  assign emu_start = (state == S_START);
  assign busy      = (state != S_IDLE) && (state != S_DONE);
  assign done      = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      idx         <= '0;
      settle      <= 1'b0;
      fault_flip  <= '0;
      class_valid <= 1'b0;
      fault_index <= '0;
      fault_class <= CLASS_A;
      cnt_a       <= '0;
      cnt_b       <= '0;
      cnt_c       <= '0;
      cnt_d       <= '0;
    end else begin
      class_valid <= 1'b0;
      unique case (state)
        S_IDLE, S_DONE: begin
          if (go) begin
            state <= S_SCAN;
            idx   <= '0;
            cnt_a <= '0;
            cnt_b <= '0;
            cnt_c <= '0;
            cnt_d <= '0;
          end
        end
        S_SCAN: begin
          if (int'(idx) >= int'(N_BITS)) begin
            state      <= S_DONE;
            fault_flip <= '0;
          end else if (fault_mask[idx]) begin
            fault_flip      <= '0;
            fault_flip[idx] <= 1'b1;
            settle          <= 1'b0;
            state           <= S_SETTLE;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_SETTLE: begin
          settle <= 1'b1;
          if (settle) state <= S_START;
        end
        S_START: state <= S_WAIT;
        S_WAIT: begin
          if (emu_finish) begin
            class_valid <= 1'b1;
            fault_index <= idx;
            fault_class <= cls;
            unique case (cls)
              CLASS_A: cnt_a <= cnt_a + 1'b1;
              CLASS_B: cnt_b <= cnt_b + 1'b1;
              CLASS_C: cnt_c <= cnt_c + 1'b1;
              default: cnt_d <= cnt_d + 1'b1;
            endcase
            idx   <= idx + 1'b1;
            state <= S_SCAN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The emulator clears finish on the start edge, so finish must be low
  // in the first WAIT cycle.
  assert property (@(posedge clk) disable iff (rst)
                   $past(state == S_START) |-> !emu_finish)
    else $error("fault_campaign: emulator finish still high after start");

endmodule
