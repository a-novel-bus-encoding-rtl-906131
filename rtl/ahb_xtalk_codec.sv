// Crosstalk-avoiding codec on a 16-bit AMBA AHB write-data path.
//
// encoder16 turns the AHB write data and byte lane enables into the 27-wire
// coded bus, registered on the rising clock edge; decoder16 sits at the far
// end of the wires and restores the data. The coded bus and the lane enables
// that travel with it are brought out so the wire activity can be observed.
//
// Interface: hwdata/byte_lane are sampled every clock; bus, bus_lane and
// rdata show that word from the next clock edge on (latency 1, throughput
// one word per clock). rdata lanes whose enable is clear read 0.
module ahb_xtalk_codec
  import xtalk_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        hwdata,
  input  logic [3:0]         byte_lane,
  output logic [BUS16_W-1:0] bus,
  output logic [3:0]         bus_lane,
  output logic [15:0]        rdata
);
  encoder16 u_enc (.clk, .rst_n, .data(hwdata), .byte_lane, .bus, .lane_q(bus_lane));
  decoder16 u_dec (.bus, .byte_lane(bus_lane), .data(rdata));
endmodule
