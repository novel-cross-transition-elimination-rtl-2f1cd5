// ss_switch: switching block of one spatial-switching pair.
//
// Two 2:1 multiplexers sharing one select. With sw = 1 the pair is routed
// straight (q = d); with sw = 0 the two wires are exchanged (q[0] = d[1],
// q[1] = d[0]). Purely combinational, no clock. The structure and the select
// polarity (Sw = 0 exchanges) follow the technique as published.
module ss_switch
  import ss_pkg::*;
(
  input  logic [1:0] d,
  input  logic       sw,
  output logic [1:0] q
);

  always_comb begin
    q[0] = (sw == SW_STRAIGHT) ? d[0] : d[1];
    q[1] = (sw == SW_STRAIGHT) ? d[1] : d[0];
  end

endmodule
