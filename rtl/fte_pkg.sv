// Shared types and helpers for the reconfigurable duplex system and its
// hardware fault emulator.
//
// two_rail_t is the OK/FAIL pair a totally self-checking (TSC) block emits:
// {ok=1, fail=0} means "correct", {ok=0, fail=1} means "error", and the two
// non-complementary pairs mean that the checking logic itself is faulty.
// fault_class_e is the four-way fault classification used to judge the
// fault-secure (FS) and self-testing (ST) properties of a circuit:
//   A hidden     - no output error for any input vector
//   B detected   - detected errors only, never an undetected one
//   C undetected - undetected errors only, never a detected one
//   D temporary  - both undetected and detected errors
package fte_pkg;

  // Inputs per LUT of the target FPGA (4-input LUTs).
  localparam int unsigned LUT_K    = 4;
  localparam int unsigned LUT_BITS = 1 << LUT_K;

  typedef struct packed {
    logic ok;
    logic fail;
  } two_rail_t;

  typedef enum logic [1:0] {
    CLASS_A = 2'd0,
    CLASS_B = 2'd1,
    CLASS_C = 2'd2,
    CLASS_D = 2'd3
  } fault_class_e;

  // A two-rail pair reports "correct" only when it is exactly {1,0}.
  function automatic logic tr_good(two_rail_t t);
    return t.ok && !t.fail;
  endfunction

  // Class from the two one-bit counters of the emulator: u remembers a
  // detected error, v an undetected one.
  function automatic fault_class_e classify(logic u, logic v);
    unique case ({u, v})
      2'b00:   return CLASS_A;
      2'b10:   return CLASS_B;
      2'b01:   return CLASS_C;
      default: return CLASS_D;
    endcase
  endfunction

endpackage
