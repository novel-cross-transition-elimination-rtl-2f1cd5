// ss_decoder: spatial-switching bus decoder (decoding block).
//
// Inverse of ss_encoder: each of the SS_BITS/2 coded pairs on the bus (3 wires,
// {wire 2k+1, wire 2k, Sw_k} at bits 3k+2..3k) goes through a deswitching
// macro that uses the received Sw wire to put the two data bits back in place;
// the uncoded most significant bits above bit 3*SS_BITS/2 are taken as they
// are. Stateless and combinational (zero latency), as published; the bus
// layout is this design's choice and must match ss_encoder.
module ss_decoder
  import ss_pkg::*;
#(
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned SS_BITS = 6,
  localparam int unsigned BUS_W  = coded_width(DATA_W, SS_BITS)
) (
  input  logic [BUS_W-1:0]  bus_in,
  output logic [DATA_W-1:0] data_out
);

  localparam int unsigned NPAIR = SS_BITS / 2;

  if (SS_BITS % 2 != 0 || SS_BITS > DATA_W || DATA_W == 0) begin : g_check
    $error("ss_decoder: SS_BITS must be even and at most DATA_W");
  end

  for (genvar k = 0; k < NPAIR; k++) begin : g_pair
    ss_deswitch u_pair (
      .pair (ss_pair_t'(bus_in[PAIR_W*k +: PAIR_W])),
      .d    (data_out[2*k +: 2])
    );
  end

  if (DATA_W > SS_BITS) begin : g_msb
    assign data_out[DATA_W-1 : SS_BITS] = bus_in[BUS_W-1 : PAIR_W*NPAIR];
  end

endmodule
