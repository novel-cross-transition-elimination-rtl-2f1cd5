// ss_pkg: types and constants shared by the spatial-switching bus codec.
//
// A coded pair is the three wires that replace two data wires on the bus:
// the two routed data wires and the switching-control wire Sw. Its bit order
// follows the column order W2 W1 Sw of the worked example of the technique:
// bit 2 = wire j+1, bit 1 = wire j, bit 0 = Sw. Sw = 1 means the pair passes
// straight, Sw = 0 means the two wires are exchanged.
package ss_pkg;

  // One coded pair on the bus: {w[1], w[0], sw}.
  typedef struct packed {
    logic [1:0] w;   // w[0] carries wire j, w[1] wire j+1 (after routing)
    logic       sw;  // 1 = straight, 0 = crossed
  } ss_pair_t;

  localparam int unsigned PAIR_W = $bits(ss_pair_t);

  localparam logic SW_STRAIGHT = 1'b1;
  localparam logic SW_CROSSED  = 1'b0;

  // Width of the coded bus: every coded pair of data wires gains one Sw wire,
  // the uncoded most significant bits keep one wire each.
  function automatic int unsigned coded_width(int unsigned data_w, int unsigned ss_bits);
    return data_w + ss_bits / 2;
  endfunction

endpackage
