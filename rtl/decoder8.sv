// Decoder for an 8-bit transfer carried on a 13-wire segment.
//
// Recovers the two cluster decode bits from the 3-bit decode info
// (inverse of xtalk_pkg::pack_decode_info) and decodes each 4-bit cluster
// with a decoder4. Shield wires are ignored. Bus layout as in encoder8.
// Combinational.
module decoder8
  import xtalk_pkg::*;
(
  input  logic [SEG8_W-1:0] bus,
  output logic [7:0]        data
);
  logic [1:0] sel;

  always_comb sel = unpack_decode_info(bus[12:10]);

  decoder4 u_dec0 (.coded(bus[3:0]), .dbit(sel[0]), .data(data[3:0]));
  decoder4 u_dec1 (.coded(bus[8:5]), .dbit(sel[1]), .data(data[7:4]));
endmodule
