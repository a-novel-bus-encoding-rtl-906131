// Crosstalk-avoiding encoder for one 4-bit bus cluster.
//
// Both candidates x_z1 = d ^ Z1 and x_z2 = d ^ Z2 (Z1 = 0101, Z2 = 1010, so
// x_z2 = ~x_z1) are checked against the current bus state x(n-1) by a type-4
// detector and an N2 pair counter each. The choice, in priority order:
//   1. x_z1 has a type-4 coupling        -> send x_z2, decode bit 1
//   2. x_z2 has a type-4 coupling        -> send x_z1, decode bit 0
//   3. N2(x_z1) > N2(x_z2)               -> send x_z2, decode bit 1
//   4. otherwise                         -> send x_z1, decode bit 0
// Because the two candidates are complements, a wire that toggles in one
// does not toggle in the other, so at least one of them is free of type-4
// couplings and the rule also removes type-2 couplings.
//
// The chosen word and decode bit are registered on the rising clock edge;
// the register output drives the bus and is also x(n-1) for the next word.
// Latency: data presented in cycle n is on the bus after that edge; one word
// per clock. Reset (asynchronous, active low) clears the bus to 0; this and
// the `ground` input, which loads 0 so that an unused lane's wires are
// grounded, are this design's additions.
module encoder4
  import xtalk_pkg::*;
#(
  parameter logic [3:0] Z1 = Z1_DEFAULT,
  parameter logic [3:0] Z2 = Z2_DEFAULT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] data,    // d(n)
  input  logic       ground,  // 1: drive the cluster and decode wire to 0
  output logic [3:0] coded,   // registered coded cluster x(n)
  output logic       dbit     // registered decode bit, 1 = Z2 used
);
  logic [3:0] x_z1, x_z2;
  logic       n4_z1, n4_z2, n2_gt;
  logic [1:0] n2_z1, n2_z2;
  logic       sel_z2;
  logic [3:0] x_sel;

  always_comb begin
    x_z1 = data ^ Z1;
    x_z2 = data ^ Z2;
  end

  n4_count   u_n4_z1 (.x_new(x_z1), .x_old(coded), .n4(n4_z1));
  n4_count   u_n4_z2 (.x_new(x_z2), .x_old(coded), .n4(n4_z2));
  n2_count   u_n2_z1 (.x_new(x_z1), .x_old(coded), .n2(n2_z1));
  n2_count   u_n2_z2 (.x_new(x_z2), .x_old(coded), .n2(n2_z2));
  n2_compare u_cmp   (.a(n2_z1), .b(n2_z2), .gt(n2_gt));

  always_comb begin
    if (n4_z1)      sel_z2 = 1'b1;
    else if (n4_z2) sel_z2 = 1'b0;
    else            sel_z2 = n2_gt;
    x_sel = sel_z2 ? x_z2 : x_z1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coded <= '0;
      dbit  <= 1'b0;
    end else if (ground) begin
      coded <= '0;
      dbit  <= 1'b0;
    end else begin
      coded <= x_sel;
      dbit  <= sel_z2;
    end
  end
endmodule
