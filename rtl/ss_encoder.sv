// ss_encoder: spatial-switching bus encoder (coding block).
//
// The DATA_W-bit input word is divided into pairs of adjacent wires. Each of
// the SS_BITS/2 least significant pairs goes through a switching macro that
// turns 2 data bits into 3 bus wires (the pair, routed straight or crossed,
// and the Sw control wire), removing every cross-transition inside the pair.
// The DATA_W-SS_BITS most significant bits, whose activity is low, are sent
// uncoded. Coded bus layout, LSB first: pair k occupies bits 3k+2..3k as
// {wire 2k+1, wire 2k, Sw_k}; the uncoded bits follow from bit 3*SS_BITS/2.
// With SS_BITS = DATA_W the whole bus is coded (3n/2 wires).
//
// Pairing of wires, the 2-to-3 macro and coding only the least significant
// bits follow the published technique; DATA_W = 8 and SS_BITS = 6 come from
// its evaluation (8-bit data, best result on 6 LSBs); the placement of the
// uncoded bits and of Sw inside a pair is this design's choice.
//
// Timing: combinational from data_in to bus_out (zero latency); each pair
// remembers the word it last drove, updated on every rising edge of clk.
module ss_encoder
  import ss_pkg::*;
#(
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned SS_BITS = 6,
  localparam int unsigned BUS_W  = coded_width(DATA_W, SS_BITS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] data_in,
  output logic [BUS_W-1:0]  bus_out
);

  localparam int unsigned NPAIR = SS_BITS / 2;

  if (SS_BITS % 2 != 0 || SS_BITS > DATA_W || DATA_W == 0) begin : g_check
    $error("ss_encoder: SS_BITS must be even and at most DATA_W");
  end

  for (genvar k = 0; k < NPAIR; k++) begin : g_pair
    ss_pair_t pair;
    ss_pair_encoder u_pair (
      .clk   (clk),
      .rst_n (rst_n),
      .d     (data_in[2*k +: 2]),
      .pair  (pair)
    );
    assign bus_out[PAIR_W*k +: PAIR_W] = pair;
  end

  if (DATA_W > SS_BITS) begin : g_msb
    assign bus_out[BUS_W-1 : PAIR_W*NPAIR] = data_in[DATA_W-1 : SS_BITS];
  end

endmodule
