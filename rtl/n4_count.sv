// Type-4 coupling detector for a 4-wire cluster.
//
// A type-4 transition on three adjacent wires is one where all three wires
// toggle and the centre wire ends opposite to both neighbours (e.g. 101 ->
// 010): the centre wire then sees four times the single-wire coupling
// capacitance. A 4-wire cluster has two such windows, wires 0-2 and 1-3, and
// the output is the OR of the two window detectors (a 1-bit "count").
//
// Each window is an AND of the three toggle signals y_i = x_i(n) ^ x_i(n-1)
// and the two neighbour-difference terms of the new word. The toggle terms,
// the y12 term, the two ANDs and the final OR follow the scheme's N4 counter;
// the outer neighbour-difference terms (x0^x1, x2^x3) are added here so the
// detector matches the type-4 definition exactly.
//
// Purely combinational, no clock.
module n4_count (
  input  logic [3:0] x_new,  // candidate bus word x(n)
  input  logic [3:0] x_old,  // current bus state x(n-1)
  output logic       n4      // 1 when a type-4 coupling would occur
);
  logic [3:0] y;       // toggles
  logic [2:0] diff;    // diff[i] = x_new[i] ^ x_new[i+1]
  logic       win_lo, win_hi;

  always_comb begin
    y      = x_new ^ x_old;
    diff   = x_new[2:0] ^ x_new[3:1];
    win_lo = &y[2:0] & diff[0] & diff[1];
    win_hi = &y[3:1] & diff[1] & diff[2];
    n4     = win_lo | win_hi;
  end
endmodule
