// Crosstalk-avoiding encoder for an 8-bit transfer (13-wire segment).
//
// The byte is split into two 4-bit clusters, data[3:0] and data[7:4], each
// coded by its own encoder4 against its own previous bus state. The two
// decode bits are sent as a 3-bit code (000, 001, 011, 111, see
// xtalk_pkg::pack_decode_info) rather than as two raw bits, so that the
// decode wires never switch in an alternating pattern. A grounded shield
// wire separates the clusters, and another separates cluster 1 from the
// decode wires, so no worst-case crosstalk crosses a boundary:
//   bus[3:0] cluster 0 | bus[4] shield | bus[8:5] cluster 1 | bus[9] shield
//   | bus[12:10] decode info
// The splitting, shielding and 3-bit code follow the scheme; the bit
// positions and which nibble counts as "first" are this design's choice.
//
// Timing: one byte per clock; the bus follows the data by one clock edge.
// `ground` drives all 13 wires to 0 from the next edge on (an unused lane).
// Assertions check that the shields stay low and only the four decode codes
// appear.
module encoder8
  import xtalk_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [7:0]          data,
  input  logic                ground,
  output logic [SEG8_W-1:0]   bus
);
  logic [3:0] coded0, coded1;
  logic       dbit0, dbit1;

  encoder4 u_enc0 (.clk, .rst_n, .data(data[3:0]), .ground, .coded(coded0), .dbit(dbit0));
  encoder4 u_enc1 (.clk, .rst_n, .data(data[7:4]), .ground, .coded(coded1), .dbit(dbit1));

  always_comb bus = {pack_decode_info(dbit0, dbit1), 1'b0, coded1, 1'b0, coded0};

  // Bus rules: shields stay grounded and the decode wires only ever carry
  // one of the four codes.
  a_shield_grounded: assert property (@(posedge clk) disable iff (!rst_n)
    bus[4] == 1'b0 && bus[9] == 1'b0);
  a_decode_code: assert property (@(posedge clk) disable iff (!rst_n)
    bus[12:10] inside {3'b000, 3'b001, 3'b011, 3'b111});
endmodule
