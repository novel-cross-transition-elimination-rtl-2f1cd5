// tb_ss_decoder: checks the bus decoder.
// Exhaustively applies all 2^11 words of the default 11-wire coded bus and all
// 2^12 words of the fully coded 12-wire bus, comparing the decoded word with
// the reference decoding (a pair is exchanged back when its Sw wire is 0,
// uncoded bits pass unchanged).
module tb_ss_decoder;
  import ss_ref_model::*;
  logic [10:0] bus6;
  logic [11:0] bus8;
  logic [7:0]  d6, d8;
  int checks = 0, failures = 0;

  ss_decoder                        dut6 (.bus_in(bus6), .data_out(d6));
  ss_decoder #(.DATA_W(8), .SS_BITS(8)) dut8 (.bus_in(bus8), .data_out(d8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus8 = '0;
    for (int i = 0; i < (1 << 11); i++) begin
      bus6 = 11'(i);
      #1;
      checks++;
      if (d6 !== ss_ref#(8,6)::decode(bus6)) begin
        failures++;
        $display("FAIL SS6 bus=%b d=%h exp=%h", bus6, d6, ss_ref#(8,6)::decode(bus6));
      end
    end
    for (int i = 0; i < (1 << 12); i++) begin
      bus8 = 12'(i);
      #1;
      checks++;
      if (d8 !== ss_ref#(8,8)::decode(bus8)) begin
        failures++;
        $display("FAIL SS8 bus=%b d=%h exp=%h", bus8, d8, ss_ref#(8,8)::decode(bus8));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
