// One-bit saturating counter ("has this event ever happened?").
//
// sum is cleared by start or sreset and set by any clock in which 'in' is 1;
// it then stays set until the next start. Two of these, one per error kind,
// are all the fault emulator needs to tell the four fault classes apart, so
// each takes a single logic cell. start wins over in in the same cycle.
// Registered output, one cycle after 'in'.
module sum1bit (
  input  logic clk,
  input  logic sreset,
  input  logic start,
  input  logic in,
  output logic sum
);

  always_ff @(posedge clk) begin
    if (sreset || start) sum <= 1'b0;
    else if (in)         sum <= 1'b1;
  end

endmodule
