// ss_deswitch: reverse switching block (deswitching macro) at the bus end.
//
// Takes one received coded pair {w[1], w[0], sw} (3 wires) and returns the
// original two data bits. Two 2:1 multiplexers driven by the received Sw wire
// undo the routing of the encoder: Sw = 1 passes the wires straight, Sw = 0
// exchanges them back. Purely combinational and stateless, as published; the
// packing of the pair into a struct is this design's choice.
module ss_deswitch
  import ss_pkg::*;
(
  input  ss_pair_t   pair,
  output logic [1:0] d
);

  always_comb begin
    d[0] = (pair.sw == SW_STRAIGHT) ? pair.w[0] : pair.w[1];
    d[1] = (pair.sw == SW_STRAIGHT) ? pair.w[1] : pair.w[0];
  end

endmodule
