// tb_ss_codec_top: end-to-end test of the codec at its default configuration
// (8-bit words, spatial switching on the 6 least significant bits, 11 bus
// wires), with the bus wires modelled as a direct connection.
//
// Stimulus: a synthetic 8-bit grey-scale image sent in raster order (a smooth
// gradient plus random noise that mostly hits the low bits), followed by
// random words. Every cycle the testbench checks that the decoded word equals
// the sent word in the same cycle (zero latency), that the coded bus equals an
// independent reference coding, and that no coded pair makes a
// cross-transition. It counts how often each mechanism occurs and fails if one
// never does: a pair being crossed (Sw = 0), a pair staying crossed for
// consecutive words, a pair returning to straight routing, a change on the
// uncoded MSB wires, and a reset during traffic. It reports how many
// in-pair cross-transitions the original data had and the coded bus has.
module tb_ss_codec_top;
  import ss_ref_model::*;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned SS_BITS = 6;
  localparam int unsigned BUS_W = DATA_W + SS_BITS / 2;
  localparam int unsigned IMG_W = 64, IMG_H = 32;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic [DATA_W-1:0] tx = '0, rx;
  logic [BUS_W-1:0]  bus;

  ss_codec_top dut (.clk(clk), .rst_n(rst_n), .tx_data(tx), .bus_tx(bus), .bus_rx(bus), .rx_data(rx));

  ss_ref #(DATA_W, SS_BITS) m = new();

  int checks = 0, failures = 0;
  int n_crossed = 0, n_held = 0, n_return = 0, n_msb = 0, n_reset = 0;
  int in_cross = 0, out_cross = 0, words = 0;
  logic [BUS_W-1:0]  prev_bus = '0;
  logic [DATA_W-1:0] prev_tx = '0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // In-pair cross-transitions of the uncoded data between two words.
  function automatic int data_cross(logic [DATA_W-1:0] a, logic [DATA_W-1:0] b);
    int n = 0;
    for (int k = 0; k < SS_BITS / 2; k++)
      if (b[2*k] != b[2*k+1] && b[2*k +: 2] == ~a[2*k +: 2]) n++;
    return n;
  endfunction

  // leave_reset = 1 lets go of reset at the same edge as the word is applied, so
  // the first word after reset is coded against the cleared state.
  task automatic send(logic [DATA_W-1:0] w, bit leave_reset = 0);
    logic [BUS_W-1:0] e;
    @(negedge clk);
    if (leave_reset) rst_n = 1'b1;
    tx = w;
    #1;
    e = m.encode(w, 1);
    checks += 3;
    if (rx !== w) begin failures++; $display("FAIL decoded %h, sent %h", rx, w); end
    if (bus !== e) begin failures++; $display("FAIL bus %b, expected %b", bus, e); end
    if (ss_ref#(DATA_W, SS_BITS)::cross_in_pairs(prev_bus, bus) != 0) begin
      failures++; $display("FAIL coded cross-transition %b -> %b", prev_bus, bus);
    end
    in_cross  += data_cross(prev_tx, w);
    out_cross += ss_ref#(DATA_W, SS_BITS)::cross_in_pairs(prev_bus, bus);
    for (int k = 0; k < SS_BITS / 2; k++) begin
      if (!bus[3*k]) n_crossed++;
      if (!bus[3*k] && !prev_bus[3*k]) n_held++;
      if (bus[3*k] && !prev_bus[3*k]) n_return++;
    end
    if (bus[BUS_W-1:3*(SS_BITS/2)] != prev_bus[BUS_W-1:3*(SS_BITS/2)]) n_msb++;
    words++;
    prev_bus = bus;
    prev_tx = w;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        int p;
        p = 2 * x + 3 * y + int'($urandom % 16) - 8;
        if (p < 0) p = 0;
        if (p > 255) p = 255;
        send(DATA_W'(p));
      end
    // Reset during traffic: encoder state clears, coding restarts from zero.
    // Word 0x15 puts 01 on every coded pair; after reset 0x2A (10 on every
    // pair) must go straight, since the cleared state is 00.
    send(8'h15);
    @(negedge clk); rst_n = 1'b0; n_reset++;
    m.reset(); prev_bus = '0; prev_tx = '0;
    send(8'h2A, 1);
    send(8'h15);
    for (int i = 0; i < 2000; i++) send(DATA_W'($urandom));
    $display("words %0d: in-pair cross-transitions original %0d, coded %0d", words, in_cross, out_cross);
    $display("crossed %0d, held crossed %0d, returned straight %0d, MSB changes %0d, resets %0d",
             n_crossed, n_held, n_return, n_msb, n_reset);
    checks += 6;
    if (n_crossed == 0) begin failures++; $display("FAIL no pair crossed"); end
    if (n_held == 0)    begin failures++; $display("FAIL no pair held crossed"); end
    if (n_return == 0)  begin failures++; $display("FAIL no pair returned straight"); end
    if (n_msb == 0)     begin failures++; $display("FAIL uncoded MSBs never changed"); end
    if (n_reset == 0)   begin failures++; $display("FAIL no reset"); end
    if (in_cross == 0 || out_cross != 0) begin failures++; $display("FAIL cross-transition counts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
