// ss_codec_top: spatial-switching codec for one on-chip bus.
//
// Holds the encoder placed at the sending end and the decoder placed at the
// receiving end of a bus. The bus itself is a set of physical wires with no
// logic function, so both of its ends are ports: bus_tx is what the encoder
// drives onto the wires, bus_rx is what arrives at the decoder. Connect them
// directly (or through a wire/repeater model) to obtain rx_data == tx_data in
// the same cycle. The coded bus has DATA_W + SS_BITS/2 wires: one extra Sw
// wire per coded pair of least significant bits.
//
// Timing: tx_data -> bus_tx and bus_rx -> rx_data are combinational; the
// encoder's memory of the last driven word updates on each rising clk edge,
// so tx_data must present one bus word per cycle. rst_n is active low.
module ss_codec_top
  import ss_pkg::*;
#(
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned SS_BITS = 6,
  localparam int unsigned BUS_W  = coded_width(DATA_W, SS_BITS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] tx_data,
  output logic [BUS_W-1:0]  bus_tx,
  input  logic [BUS_W-1:0]  bus_rx,
  output logic [DATA_W-1:0] rx_data
);

  ss_encoder #(.DATA_W(DATA_W), .SS_BITS(SS_BITS)) u_encoder (
    .clk     (clk),
    .rst_n   (rst_n),
    .data_in (tx_data),
    .bus_out (bus_tx)
  );

  ss_decoder #(.DATA_W(DATA_W), .SS_BITS(SS_BITS)) u_decoder (
    .bus_in   (bus_rx),
    .data_out (rx_data)
  );

endmodule
