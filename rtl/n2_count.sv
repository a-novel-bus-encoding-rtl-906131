// Opposite-transition pair counter (the "N2 count") for a 4-wire cluster.
//
// For each adjacent pair (0-1, 1-2, 2-3) a term is set when both wires
// toggle and end in different states, i.e. they switch in opposite
// directions. The three terms y_i & y_{i+1} & (x_i(n) ^ x_{i+1}(n)) are
// summed by a small adder into a 2-bit count (maximum 3). The encoder
// compares these counts of its two candidates to pick the one with fewer
// opposite transitions. Structure as in the scheme's N2 counter.
//
// Purely combinational, no clock.
module n2_count (
  input  logic [3:0] x_new,  // candidate bus word x(n)
  input  logic [3:0] x_old,  // current bus state x(n-1)
  output logic [1:0] n2      // number of opposite-toggling adjacent pairs
);
  logic [3:0] y;
  logic [2:0] pair;

  always_comb begin
    y    = x_new ^ x_old;
    pair = y[2:0] & y[3:1] & (x_new[2:0] ^ x_new[3:1]);
    n2   = 2'(pair[0]) + 2'(pair[1]) + 2'(pair[2]);
  end
endmodule
