// Decoder for one 4-bit bus cluster.
//
// The decode bit selects the basis word the encoder used (0: Z1 = 0101,
// 1: Z2 = 1010), and XORing it with the coded cluster restores the data.
// Combinational: data is valid in the same cycle the coded word is on the bus.
module decoder4
  import xtalk_pkg::*;
#(
  parameter logic [3:0] Z1 = Z1_DEFAULT,
  parameter logic [3:0] Z2 = Z2_DEFAULT
) (
  input  logic [3:0] coded,  // coded cluster from the bus
  input  logic       dbit,   // decode bit, 1 = Z2
  output logic [3:0] data    // original data
);
  always_comb data = coded ^ (dbit ? Z2 : Z1);
endmodule
