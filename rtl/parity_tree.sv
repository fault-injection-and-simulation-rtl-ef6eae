// Balanced XOR tree: xor_out is the XOR of all WIDTH bits of in_vec.
//
// The tree is built level by level from FANIN-input XOR nodes, each node
// standing for one LUT of the FPGA. Every level groups the previous level's
// signals FANIN at a time, so the depth is ceil(log_FANIN(WIDTH)) and the
// number of nodes is ceil((WIDTH-1)/(FANIN-1)), the same as an unbalanced
// chain but with the smallest delay. The balanced shape and the node count
// follow the parity-tree discussion this design is based on; FANIN = 4
// matches 4-input LUTs, FANIN = 2 gives the 2-input XOR tree.
// Purely combinational; no clock.
module parity_tree #(
  parameter int unsigned WIDTH = 6,
  parameter int unsigned FANIN = 4
) (
  input  logic [WIDTH-1:0] in_vec,
  output logic             xor_out
);

  // Number of levels needed to reduce WIDTH signals to one.
  function automatic int unsigned num_levels(int unsigned w, int unsigned f);
    int unsigned n = w;
    int unsigned l = 0;
    while (n > 1) begin
      n = (n + f - 1) / f;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels(WIDTH, FANIN);

  // node[l][i]: signal i at level l; level 0 holds the inputs.
  logic [LEVELS:0][WIDTH-1:0] node;

  always_comb begin
    int unsigned n;
    node    = '0;
    node[0] = in_vec;
    n       = WIDTH;
    for (int unsigned l = 0; l < LEVELS; l++) begin
      for (int unsigned i = 0; i < WIDTH; i++) begin
        if (i < (n + FANIN - 1) / FANIN) begin
          for (int unsigned j = 0; j < FANIN; j++) begin
            if (i * FANIN + j < n) node[l+1][i] ^= node[l][i*FANIN+j];
          end
        end
      end
      n = (n + FANIN - 1) / FANIN;
    end
  end

  assign xor_out = node[LEVELS][0];

  initial begin
    assert (FANIN >= 2) else $error("parity_tree: FANIN must be at least 2");
  end

endmodule
