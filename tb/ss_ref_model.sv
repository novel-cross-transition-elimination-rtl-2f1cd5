// ss_ref_model: reference model of the spatial-switching encoder for the
// testbenches, written independently of the RTL as a class. It keeps the coded
// word last driven on the bus and, for each new word, exchanges a coded pair
// (Sw = 0) exactly when sending it straight would make an opposite transition
// on its two wires. Bus layout: pair k at bits 3k+2..3k as {wire 2k+1,
// wire 2k, Sw}, then the uncoded bits.
package ss_ref_model;

  class ss_ref #(int unsigned DATA_W = 8, int unsigned SS_BITS = 6);
    localparam int unsigned BUS_W = DATA_W + SS_BITS / 2;
    logic [BUS_W-1:0] prev_bus;

    function new();
      prev_bus = '0;
    endfunction

    function void reset();
      prev_bus = '0;
    endfunction

    // Coded bus for data word `d`; commit = 1 remembers it as the new previous.
    function logic [BUS_W-1:0] encode(logic [DATA_W-1:0] d, bit commit);
      logic [BUS_W-1:0] b;
      b = '0;
      for (int k = 0; k < SS_BITS / 2; k++) begin
        logic [1:0] dd, pp;
        dd = d[2*k +: 2];
        pp = prev_bus[3*k+1 +: 2];
        if (dd[0] != dd[1] && dd == ~pp) b[3*k +: 3] = {dd[0], dd[1], 1'b0};
        else                             b[3*k +: 3] = {dd, 1'b1};
      end
      for (int i = SS_BITS; i < DATA_W; i++) b[3*(SS_BITS/2) + i - SS_BITS] = d[i];
      if (commit) prev_bus = b;
      return b;
    endfunction

    static function logic [DATA_W-1:0] decode(logic [BUS_W-1:0] b);
      logic [DATA_W-1:0] d;
      for (int k = 0; k < SS_BITS / 2; k++)
        d[2*k +: 2] = b[3*k] ? b[3*k+1 +: 2] : {b[3*k+1], b[3*k+2]};
      for (int i = SS_BITS; i < DATA_W; i++) d[i] = b[3*(SS_BITS/2) + i - SS_BITS];
      return d;
    endfunction

    // Number of adjacent data-wire pairs (within coded pairs) that make an
    // opposite transition between two bus words.
    static function int cross_in_pairs(logic [BUS_W-1:0] a, logic [BUS_W-1:0] b);
      int n = 0;
      for (int k = 0; k < SS_BITS / 2; k++) begin
        logic [1:0] x, y;
        x = a[3*k+1 +: 2];
        y = b[3*k+1 +: 2];
        if (y[0] != y[1] && y == ~x) n++;
      end
      return n;
    endfunction
  endclass

endpackage
