// Totally self-checking parity checker.
//
// code_in is a code word: the circuit outputs together with their predicted
// parity bit, so that a correct word has an even number of ones. The checker
// produces a two-rail result from two independent parity trees that share no
// logic:
//   check.ok   = NOT(XOR of all bits)  (even-parity tree, 1 for a code word)
//   check.fail =     XOR of all bits   (odd-parity tree,  1 for a non-code word)
// A fault in either tree makes the pair non-complementary, which a two-rail
// receiver sees as an error, so the checker is self-checking. The two
// equations and the "no shared logic" rule are the documented ones; using a
// separate parity_tree instance per rail is how this design keeps them apart.
// Combinational.
module tsc_checker
  import fte_pkg::*;
#(
  parameter int unsigned WIDTH = 6,
  parameter int unsigned FANIN = LUT_K
) (
  input  logic [WIDTH-1:0] code_in,
  output two_rail_t        check
);

  logic x_ok, x_fail;

  parity_tree #(.WIDTH(WIDTH), .FANIN(FANIN)) u_even_tree (
    .in_vec (code_in),
    .xor_out(x_ok)
  );

  parity_tree #(.WIDTH(WIDTH), .FANIN(FANIN)) u_odd_tree (
    .in_vec (code_in),
    .xor_out(x_fail)
  );

  assign check.ok   = ~x_ok;
  assign check.fail = x_fail;

endmodule
