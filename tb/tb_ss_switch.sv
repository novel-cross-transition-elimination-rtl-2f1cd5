// tb_ss_switch: exhaustive check of the pair switching block.
// All 8 combinations of the two data bits and the select are applied; the
// expected routing (sw = 1 straight, sw = 0 exchanged) is written out here
// independently of the block.
module tb_ss_switch;
  logic [1:0] d, q;
  logic       sw;
  int checks = 0, failures = 0;

  ss_switch dut (.d(d), .sw(sw), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [1:0] exp;
      {sw, d} = 3'(i);
      exp = sw ? d : {d[0], d[1]};
      #1;
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL sw=%b d=%b q=%b expected %b", sw, d, q, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
