// Crosstalk-avoiding encoder for the lower 16 bits of an AHB write-data bus.
//
// One encoder8 per byte lane produces a 13-wire segment; a grounded shield
// wire separates the two segments, giving a 27-wire bus:
//   bus[12:0] byte lane 0 | bus[13] shield | bus[26:14] byte lane 1
// A byte lane whose enable is clear is not encoded: its segment is driven to
// 0 (grounded), so an 8-bit transfer on lane 0 only uses the lower segment,
// as the scheme describes. Applying the same rule to each lane separately,
// and ignoring lanes 2 and 3, is this design's reading of it.
//
// The byte lane enables are registered with the data (lane_q) so that the
// decoder receives the enables belonging to the word on the bus.
// Timing: one transfer per clock, one clock edge from data to bus.
module encoder16
  import xtalk_pkg::*;
#(
  parameter int unsigned BUS_W = BUS16_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      data,
  input  logic [3:0]       byte_lane,  // AHB byte lane enables
  output logic [BUS_W-1:0] bus,
  output logic [3:0]       lane_q      // enables of the word on the bus
);
  logic [SEG8_W-1:0] seg0, seg1;

  encoder8 u_lane0 (.clk, .rst_n, .data(data[7:0]),  .ground(!byte_lane[0]), .bus(seg0));
  encoder8 u_lane1 (.clk, .rst_n, .data(data[15:8]), .ground(!byte_lane[1]), .bus(seg1));

  always_comb bus = {seg1, 1'b0, seg0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lane_q <= '0;
    else        lane_q <= byte_lane;
  end

  // The bus width is fixed by the segment layout.
  initial assert (BUS_W == 2 * SEG8_W + 1)
    else $error("encoder16: BUS_W must be %0d", 2 * SEG8_W + 1);
endmodule
