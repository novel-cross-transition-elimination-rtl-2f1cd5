// ss_cross_detect: cross-transition detection block of one spatial-switching
// pair.
//
// A cross-transition is an opposite transition on two adjacent wires (01 -> 10
// or 10 -> 01). Two registers hold the pair as it was last driven on the bus
// (the coded wires, fed back from the switching block). Three XORs compare the
// current input bits with each other and each input bit with the previous
// coded value of the same wire; a NAND of the three gives the switching signal:
//   sw = ~( (d[0]^d[1]) & (d[0]^prev[0]) & (d[1]^prev[1]) )
// so sw = 0 (exchange the wires) exactly when sending d straight would make a
// cross-transition. The gate structure, the use of the coded wires as the
// previous value and the polarity follow the technique as published.
//
// Timing: sw is combinational from d and from the registers; the registers
// take `coded` on every rising clock edge (one bus word per cycle). Reset
// (active low, asynchronous, to 00) is this design's choice.
module ss_cross_detect
  import ss_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] d,      // current uncoded pair
  input  logic [1:0] coded,  // current coded pair, stored for the next cycle
  output logic       sw
);

  logic [1:0] prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prev <= '0;
    else        prev <= coded;
  end

  logic x_pair, x_w0, x_w1;

  always_comb begin
    x_pair = d[0] ^ d[1];
    x_w0   = d[0] ^ prev[0];
    x_w1   = d[1] ^ prev[1];
    // NAND of the three XORs: all ones means a cross-transition.
    sw     = (x_pair & x_w0 & x_w1) ? SW_CROSSED : SW_STRAIGHT;
  end

endmodule
