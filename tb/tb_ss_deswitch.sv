// tb_ss_deswitch: exhaustive check of the reverse switching block.
// For every received pair {w1, w0, sw} the recovered bits must be the wires
// as received when sw = 1 and the wires exchanged when sw = 0. It also checks
// that deswitching undoes switching for every data pair and select value.
module tb_ss_deswitch;
  import ss_pkg::*;
  ss_pair_t   pair;
  logic [1:0] d;
  int checks = 0, failures = 0;

  ss_deswitch dut (.pair(pair), .d(d));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [1:0] exp;
      pair = ss_pair_t'(3'(i));
      exp  = pair.sw ? pair.w : {pair.w[0], pair.w[1]};
      #1;
      checks++;
      if (d !== exp) begin
        failures++;
        $display("FAIL pair=%b d=%b expected %b", pair, d, exp);
      end
    end
    // Round trip: data routed by an independent switch model comes back.
    for (int i = 0; i < 8; i++) begin
      logic [1:0] orig;
      logic       s;
      {s, orig} = 3'(i);
      pair.sw = s;
      pair.w  = s ? orig : {orig[0], orig[1]};
      #1;
      checks++;
      if (d !== orig) begin
        failures++;
        $display("FAIL round trip sw=%b orig=%b got %b", s, orig, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
