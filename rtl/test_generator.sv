// Exhaustive test-vector generator of the fault emulator.
//
// A one-cycle 'start' resets the vector counter to 0 and runs it through all
// 2**N_IN input vectors, one per clock, so one (vector, fault) iteration
// costs one clock. 'finish' is cleared by start and rises LATENCY cycles
// after the last vector has been presented, i.e. once the last result has
// passed the pipeline registers behind the generator and reached the
// one-bit counters; it then stays high until the next start. The counter
// holds its last value when idle. sreset is a synchronous reset.
// Timing: start sampled at edge 0 -> test_vector = 0 after edge 0,
// = 2**N_IN-1 after edge 2**N_IN-1, finish = 1 after edge 2**N_IN-1+LATENCY.
// Exhaustive counting and the start/finish/sreset ports follow the
// documented test structure; the counter order and LATENCY are this
// design's choice.
module test_generator #(
  parameter int unsigned N_IN    = 18,
  parameter int unsigned LATENCY = 3
) (
  input  logic            clk,
  input  logic            sreset,
  input  logic            start,
  output logic [N_IN-1:0] test_vector,
  output logic            finish
);

  logic                running;
  logic [LATENCY-2:0]  done_pipe;
  logic                last;

  assign last = running && (test_vector == '1);

  always_ff @(posedge clk) begin
    if (sreset) begin
      test_vector <= '0;
      running     <= 1'b0;
      done_pipe   <= '0;
      finish      <= 1'b0;
    end else if (start) begin
      test_vector <= '0;
      running     <= 1'b1;
      done_pipe   <= '0;
      finish      <= 1'b0;
    end else begin
      if (running && !last) test_vector <= test_vector + 1'b1;
      if (last) running <= 1'b0;
      done_pipe <= (done_pipe << 1) | (LATENCY-1)'(last);
      if (done_pipe[LATENCY-2]) finish <= 1'b1;
    end
  end

  initial begin
    assert (LATENCY >= 2) else $error("test_generator: LATENCY must be at least 2");
  end

endmodule
