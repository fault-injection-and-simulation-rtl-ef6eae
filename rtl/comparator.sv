// Two-rail equality comparator of two WIDTH-bit result vectors.
//
// First stage: the bits are taken in pairs, and one 4-input LUT per pair
// forms the sub-equal se_k = XNOR(r[2k],s[2k]) AND XNOR(r[2k+1],s[2k+1]).
// Second stage: an AND tree of 4-input nodes collects the sub-equals into
// 'equal'. This two-stage structure is the documented one. For the
// self-checking version a second, disjoint network forms the not-equal rail
// (OR of the bitwise XORs, in the same pair/tree shape), so cmp.ok = equal
// and cmp.fail = not equal; a non-complementary pair flags a comparator
// fault. The separate fail rail is this design's reading of the "TSC
// comparator". Combinational.
module comparator
  import fte_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] r,
  input  logic [WIDTH-1:0] s,
  output logic             equal,
  output two_rail_t        cmp
);

  localparam int unsigned NSUB = (WIDTH + 1) / 2;

  // Number of levels of the 4-input collecting tree.
  function automatic int unsigned num_levels(int unsigned w);
    int unsigned n = w;
    int unsigned l = 0;
    while (n > 1) begin
      n = (n + LUT_K - 1) / LUT_K;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels(NSUB);

  logic [NSUB-1:0]             sub_eq, sub_ne;
  logic [LEVELS:0][NSUB-1:0]   and_node, or_node;

  // Stage 1: sub-equal (and sub-not-equal) LUTs over bit pairs.
  always_comb begin
    for (int unsigned k = 0; k < NSUB; k++) begin
      sub_eq[k] = ~(r[2*k] ^ s[2*k]);
      sub_ne[k] =  (r[2*k] ^ s[2*k]);
      if (2*k + 1 < WIDTH) begin
        sub_eq[k] = sub_eq[k] & ~(r[2*k+1] ^ s[2*k+1]);
        sub_ne[k] = sub_ne[k] |  (r[2*k+1] ^ s[2*k+1]);
      end
    end
  end

  // Stage 2: 4-input AND tree (and its OR dual for the fail rail).
  always_comb begin
    int unsigned n;
    and_node    = '1;
    or_node     = '0;
    and_node[0] = sub_eq;
    or_node[0]  = sub_ne;
    n           = NSUB;
    for (int unsigned l = 0; l < LEVELS; l++) begin
      for (int unsigned i = 0; i < NSUB; i++) begin
        if (i < (n + LUT_K - 1) / LUT_K) begin
          for (int unsigned j = 0; j < LUT_K; j++) begin
            if (i * LUT_K + j < n) begin
              and_node[l+1][i] &= and_node[l][i*LUT_K+j];
              or_node[l+1][i]  |= or_node[l][i*LUT_K+j];
            end
          end
        end
      end
      n = (n + LUT_K - 1) / LUT_K;
    end
  end

  assign equal    = and_node[LEVELS][0];
  assign cmp.ok   = equal;
  assign cmp.fail = or_node[LEVELS][0];

endmodule
