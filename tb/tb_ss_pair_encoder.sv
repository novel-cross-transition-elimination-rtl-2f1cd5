// tb_ss_pair_encoder: checks the 2-wire to 3-wire switching macro.
// First the five-word example of the technique (W2 W1 = 00, 01, 10, 10, 01
// must be coded as W2 W1 Sw = 00 1, 01 1, 01 0, 01 0, 01 1), then 3000 random
// words against a reference model kept here: the pair is exchanged (Sw = 0)
// exactly when sending it straight would make an opposite transition on the
// two wires. Every cycle it also checks that the coded wires never make a
// cross-transition and that reverse switching recovers the input.
module tb_ss_pair_encoder;
  import ss_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [1:0] d = '0;
  ss_pair_t   pair;
  logic [1:0] model_prev = '0;
  int checks = 0, failures = 0, n_crossed = 0, n_in_cross = 0, n_out_cross = 0;

  ss_pair_encoder dut (.clk(clk), .rst_n(rst_n), .d(d), .pair(pair));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference coding of one word against the previously driven coded pair.
  function automatic ss_pair_t ref_code(logic [1:0] dd, logic [1:0] prev);
    ss_pair_t r;
    if (dd[0] != dd[1] && dd == ~prev) begin
      r.w  = {dd[0], dd[1]};
      r.sw = 1'b0;
    end else begin
      r.w  = dd;
      r.sw = 1'b1;
    end
    return r;
  endfunction

  logic [1:0] last_in = '0;

  task automatic step(logic [1:0] dd, ss_pair_t expect_fixed, bit use_fixed);
    ss_pair_t e;
    logic [1:0] back;
    @(negedge clk);
    d = dd;
    #1;
    e = use_fixed ? expect_fixed : ref_code(dd, model_prev);
    checks++;
    if (pair !== e) begin
      failures++;
      $display("FAIL d=%b prev=%b pair=%b expected %b", dd, model_prev, pair, e);
    end
    // Decode independently and compare with the input.
    back = pair.sw ? pair.w : {pair.w[0], pair.w[1]};
    checks++;
    if (back !== dd) begin
      failures++;
      $display("FAIL round trip d=%b got %b", dd, back);
    end
    // No cross-transition on the coded wires.
    checks++;
    if (pair.w[0] != pair.w[1] && pair.w == ~model_prev) begin
      failures++;
      $display("FAIL coded cross-transition %b -> %b", model_prev, pair.w);
    end
    if (dd[0] != dd[1] && dd == ~last_in) n_in_cross++;
    if (pair.w[0] != pair.w[1] && pair.w == ~model_prev) n_out_cross++;
    if (!pair.sw) n_crossed++;
    @(posedge clk);
    model_prev = pair.w;
    last_in = dd;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    // The published example; w = {W2, W1}.
    step(2'b00, '{w: 2'b00, sw: 1'b1}, 1);
    step(2'b01, '{w: 2'b01, sw: 1'b1}, 1);
    step(2'b10, '{w: 2'b01, sw: 1'b0}, 1);
    step(2'b10, '{w: 2'b01, sw: 1'b0}, 1);
    step(2'b01, '{w: 2'b01, sw: 1'b1}, 1);
    for (int i = 0; i < 3000; i++) step(2'($urandom), '0, 0);
    $display("input cross-transitions %0d, coded cross-transitions %0d, crossed words %0d",
             n_in_cross, n_out_cross, n_crossed);
    checks++;
    if (n_crossed == 0 || n_in_cross == 0) begin
      failures++;
      $display("FAIL switching never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
