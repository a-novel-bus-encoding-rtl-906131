// Decoder for the 27-wire coded AHB data bus.
//
// Two decoder8 instances decode the byte-lane segments (bus layout as in
// encoder16). A lane whose enable is clear reads 0. Combinational: the
// decoded word is valid in the cycle its coded form is on the bus.
module decoder16
  import xtalk_pkg::*;
(
  input  logic [BUS16_W-1:0] bus,
  input  logic [3:0]         byte_lane,  // enables of the word on the bus
  output logic [15:0]        data
);
  logic [7:0] d0, d1;

  decoder8 u_lane0 (.bus(bus[12:0]),  .data(d0));
  decoder8 u_lane1 (.bus(bus[26:14]), .data(d1));

  always_comb data = {byte_lane[1] ? d1 : 8'h00, byte_lane[0] ? d0 : 8'h00};
endmodule
