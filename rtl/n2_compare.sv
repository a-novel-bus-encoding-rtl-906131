// 2-bit magnitude comparator of the encoder's selection logic.
//
// gt is 1 when the N2 count of the Z1 candidate (a) is strictly greater than
// that of the Z2 candidate (b); on a tie the Z1 candidate is kept, as the
// scheme specifies. Combinational.
module n2_compare (
  input  logic [1:0] a,   // N2 count of x_z1
  input  logic [1:0] b,   // N2 count of x_z2
  output logic       gt   // a > b
);
  always_comb gt = (a > b);
endmodule
