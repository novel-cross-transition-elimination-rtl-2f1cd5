// ss_pair_encoder: switching macro, codes two data wires onto three bus wires.
//
// The cross-transition detection block decides from the current input pair
// and the previously driven coded pair whether a straight transfer would make
// a cross-transition; the switching block then routes the pair straight or
// crossed, and the decision is sent on the extra Sw wire. When the pair is
// crossed the coded wires keep their previous values, so the coded pair never
// shows a cross-transition. Structure as published; packing of the output
// into ss_pair_t is this design's choice.
//
// Timing: output combinational from d; internal state updates on every rising
// edge of clk. Reset (active low, asynchronous) clears the stored pair to 00.
module ss_pair_encoder
  import ss_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] d,
  output ss_pair_t   pair
);

  logic       sw;
  logic [1:0] routed;

  ss_cross_detect u_detect (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (d),
    .coded (routed),
    .sw    (sw)
  );

  ss_switch u_switch (
    .d  (d),
    .sw (sw),
    .q  (routed)
  );

  assign pair = '{w: routed, sw: sw};

  // The coded pair must never make an opposite transition on its two wires.
  // last_routed exists only for this check (synthesis removes it); the check
  // is disabled while rst_n is low, which is why rst_n also appears as a
  // synchronous signal to lint tools.
  logic [1:0] last_routed;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_routed <= '0;
    else        last_routed <= routed;
  end

  cross_free : assert property (@(posedge clk) disable iff (!rst_n)
    !((routed[0] != routed[1]) && (routed == ~last_routed)))
    else $error("ss_pair_encoder: cross-transition on coded pair");

endmodule
