// Shared constants of the crosstalk-avoiding bus codec.
//
// The codec splits data into 4-bit clusters. Each cluster is sent either
// XORed with Z1 = 0101 or with Z2 = 1010 (alternate-bit complement), and one
// decode bit per cluster says which. The basis words are the ones the scheme
// is built on; the bus bit positions below are this design's own layout:
//   8-bit segment (13 wires): [3:0] cluster 0, [4] shield, [8:5] cluster 1,
//                             [9] shield, [12:10] decode info (Table-1 code)
//   16-bit bus (27 wires):    [12:0] byte lane 0 segment, [13] shield,
//                             [26:14] byte lane 1 segment
// Shield wires are grounded (constant 0).
package xtalk_pkg;
  localparam logic [3:0] Z1_DEFAULT = 4'b0101;
  localparam logic [3:0] Z2_DEFAULT = 4'b1010;

  localparam int unsigned SEG8_W    = 13;  // 4 + 1 + 4 + 1 + 3
  localparam int unsigned BUS16_W   = 27;  // 13 + 1 + 13

  // 3-bit decode information for two clusters. The code is chosen so that
  // no two codes differ by an alternating pattern, which keeps the decode
  // wires themselves free of worst-case crosstalk.
  //   cluster0 cluster1  code
  //   Z1       Z1        000
  //   Z1       Z2        001
  //   Z2       Z1        011
  //   Z2       Z2        111
  function automatic logic [2:0] pack_decode_info(logic sel0, logic sel1);
    return {sel0 & sel1, sel0, sel0 | sel1};
  endfunction

  function automatic logic [1:0] unpack_decode_info(logic [2:0] info);
    // returns {sel1, sel0}
    return {info[2] | (info[0] & ~info[1]), info[1]};
  endfunction
endpackage
