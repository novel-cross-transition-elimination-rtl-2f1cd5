// tb_ss_cross_detect: checks the cross-transition detection block.
// The testbench drives the current pair d and the "coded" feedback freely and
// keeps its own copy of the coded value of the previous cycle. The expected
// switching signal is 0 exactly when d has two different bits and both bits
// differ from the previous coded value (an opposite transition on both wires),
// 1 otherwise. Directed cases cover both cross-transitions (01->10, 10->01),
// then 2000 random cycles; reset must clear the stored value to 00.
module tb_ss_cross_detect;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [1:0] d = '0, coded = '0, prev_model;
  logic       sw;
  int checks = 0, failures = 0, crossed = 0;

  ss_cross_detect dut (.clk(clk), .rst_n(rst_n), .d(d), .coded(coded), .sw(sw));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expected_sw(logic [1:0] dd, logic [1:0] pp);
    return !((dd[0] != dd[1]) && (dd[0] != pp[0]) && (dd[1] != pp[1]));
  endfunction

  task automatic check_now(string what);
    logic e;
    #1;
    e = expected_sw(d, prev_model);
    checks++;
    if (!e) crossed++;
    if (sw !== e) begin
      failures++;
      $display("FAIL %s: d=%b prev=%b sw=%b expected %b", what, d, prev_model, sw, e);
    end
  endtask

  // One cycle: apply d and coded after the edge, check, then clock them in.
  task automatic step(logic [1:0] dd, logic [1:0] cc, string what);
    @(negedge clk);
    d = dd;
    coded = cc;
    check_now(what);
    @(posedge clk);
    prev_model = cc;
  endtask

  initial begin
    prev_model = '0;
    repeat (2) @(posedge clk);
    // During reset the stored value reads as 00.
    @(negedge clk); d = 2'b11; coded = 2'b10; check_now("in reset");
    @(negedge clk); rst_n = 1'b1; d = '0; coded = '0;
    step(2'b01, 2'b01, "straight 00->01");
    step(2'b10, 2'b01, "cross 01->10");       // detected, coded held at 01
    step(2'b10, 2'b01, "cross held");         // still a cross against 01
    step(2'b01, 2'b01, "no change");
    step(2'b10, 2'b10, "cross forced straight");
    step(2'b01, 2'b01, "cross 10->01");
    step(2'b11, 2'b11, "equal bits");
    step(2'b00, 2'b00, "both fall");
    for (int i = 0; i < 2000; i++) begin
      step(2'($urandom), 2'($urandom), "random");
    end
    if (crossed == 0) begin
      failures++;
      $display("FAIL no cross-transition was ever detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
