// tb_ss_workloads: runs the evaluated configurations of spatial switching on
// an 8-bit bus side by side: coding the 2, 4, 6 and 8 least significant bits.
// All four codecs receive the same synthetic grey-scale image (raster order,
// smooth gradient plus noise on the low bits), one pixel per cycle, with the
// bus wires modelled as direct connections.
//
// For each configuration it checks, on every word, that the decoded pixel
// equals the sent one in the same cycle and that no coded pair makes a
// cross-transition; it checks once that the bus has one extra wire per coded
// pair (8 + SS/2 wires). It reports per
// configuration how many in-pair cross-transitions the image had on the coded
// bits, how many remain on the bus, and the toggles on the data and Sw wires.
// Electrical results (energy, frequency) are outside what RTL simulation
// gives.
module tb_ss_workloads;
  localparam int NCFG = 4;
  localparam int IMG_W = 128, IMG_H = 64;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] tx = '0;
  int checks = 0, failures = 0;
  int in_cross [NCFG];
  int out_cross[NCFG];
  int data_tog [NCFG];
  int sw_tog   [NCFG];
  int n_crossed[NCFG];
  bit run = 1'b0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (IMG_W * IMG_H + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned SS = 2 * (c + 1);
    localparam int unsigned BW = 8 + SS / 2;
    logic [BW-1:0] bus, prev_bus;
    logic [7:0]    rx, prev_in;

    ss_codec_top #(.DATA_W(8), .SS_BITS(SS)) u_codec (
      .clk(clk), .rst_n(rst_n), .tx_data(tx), .bus_tx(bus), .bus_rx(bus), .rx_data(rx)
    );

    initial begin
      prev_bus = '0;
      prev_in = '0;
      in_cross[c] = 0; out_cross[c] = 0; data_tog[c] = 0; sw_tog[c] = 0; n_crossed[c] = 0;
    end

    // Sample just before the rising edge, when the word is stable.
    always @(posedge clk) if (run) begin
      checks += 2;
      if (rx !== tx) begin
        failures++;
        $display("FAIL SS=%0d decoded %h sent %h", SS, rx, tx);
      end
      for (int k = 0; k < int'(SS / 2); k++) begin
        logic [1:0] a, b, x, y;
        a = prev_in[2*k +: 2];
        b = tx[2*k +: 2];
        x = prev_bus[3*k+1 +: 2];
        y = bus[3*k+1 +: 2];
        if (b[0] != b[1] && b == ~a) in_cross[c]++;
        if (y[0] != y[1] && y == ~x) out_cross[c]++;
        if (!bus[3*k]) n_crossed[c]++;
        if (bus[3*k] != prev_bus[3*k]) sw_tog[c]++;
        data_tog[c] += int'(x[0] != y[0]) + int'(x[1] != y[1]);
      end
      for (int i = 3 * int'(SS / 2); i < int'(BW); i++)
        data_tog[c] += int'(bus[i] != prev_bus[i]);
      if (out_cross[c] != 0) begin
        failures++;
        $display("FAIL SS=%0d cross-transition on the coded bus", SS);
        out_cross[c] = 0;
      end
      prev_bus <= bus;
      prev_in  <= tx;
    end

    initial begin
      checks++;
      if ($bits(bus) != 8 + int'(SS / 2)) begin
        failures++;
        $display("FAIL SS=%0d bus width %0d", SS, $bits(bus));
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1; run = 1'b1;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        int p;
        p = x + 2 * y + int'($urandom % 24) - 12;
        if (p < 0) p = 0;
        if (p > 255) p = 255;
        tx = 8'(p);
        @(negedge clk);
      end
    run = 1'b0;
    for (int c = 0; c < NCFG; c++) begin
      $display("SS on %0d LSBs: %0d bus wires, in-pair cross-transitions %0d -> %0d, crossed words %0d, data-wire toggles %0d, Sw toggles %0d",
               2 * (c + 1), 8 + c + 1, in_cross[c], out_cross[c], n_crossed[c], data_tog[c], sw_tog[c]);
      checks++;
      if (in_cross[c] == 0 || n_crossed[c] == 0) begin
        failures++;
        $display("FAIL SS=%0d switching never exercised", 2 * (c + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
