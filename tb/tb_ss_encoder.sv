// tb_ss_encoder: checks the bus encoder against the reference model.
// Runs the default configuration (8-bit data, 6 coded LSBs, 11 bus wires) and
// a fully coded 8-bit bus (SS_BITS = 8, 12 wires) side by side on the same
// random words. Each cycle the coded bus must equal the reference coding, the
// coded pairs must carry no cross-transition, and the uncoded MSBs must appear
// unchanged. A reset in the middle must bring the stored word back to zero.
module tb_ss_encoder;
  import ss_ref_model::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  data = '0;
  logic [10:0] bus6;
  logic [11:0] bus8;
  int checks = 0, failures = 0, n_sw0 = 0;

  ss_encoder                        dut6 (.clk(clk), .rst_n(rst_n), .data_in(data), .bus_out(bus6));
  ss_encoder #(.DATA_W(8), .SS_BITS(8)) dut8 (.clk(clk), .rst_n(rst_n), .data_in(data), .bus_out(bus8));

  ss_ref #(8, 6) m6 = new();
  ss_ref #(8, 8) m8 = new();

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // leave_reset = 1 lets go of reset at the edge where the word is applied.
  task automatic step(logic [7:0] w, bit leave_reset = 0);
    logic [10:0] e6, p6;
    logic [11:0] e8, p8;
    @(negedge clk);
    if (leave_reset) rst_n = 1'b1;
    data = w;
    #1;
    p6 = m6.prev_bus;
    p8 = m8.prev_bus;
    e6 = m6.encode(w, 1);
    e8 = m8.encode(w, 1);
    checks += 4;
    if (bus6 !== e6) begin failures++; $display("FAIL SS6 d=%h bus=%b exp=%b", w, bus6, e6); end
    if (bus8 !== e8) begin failures++; $display("FAIL SS8 d=%h bus=%b exp=%b", w, bus8, e8); end
    if (ss_ref#(8,6)::cross_in_pairs(p6, bus6) != 0) begin failures++; $display("FAIL SS6 cross"); end
    if (bus6[10:9] !== w[7:6]) begin failures++; $display("FAIL SS6 MSBs"); end
    for (int k = 0; k < 3; k++) if (!bus6[3*k]) n_sw0++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    step(8'h00); step(8'h55); step(8'hAA); step(8'hAA); step(8'h55); step(8'hFF);
    for (int i = 0; i < 2000; i++) step(8'($urandom));
    // Reset mid-stream: the stored coded word goes back to zero.
    step(8'h55);
    @(negedge clk); rst_n = 1'b0;
    m6.reset(); m8.reset();
    step(8'hAA, 1); step(8'h55);
    for (int i = 0; i < 2000; i++) step(8'($urandom));
    checks++;
    if (n_sw0 == 0) begin failures++; $display("FAIL no pair was ever crossed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
