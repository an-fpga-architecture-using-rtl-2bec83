// "Traffic pole" switch (TPS) at one crossing of a horizontal and a vertical
// routing channel, for all eight wires.
//
// For every wire, four segments meet at the crossing (north, south, east,
// west) and six pass transistors join each pair of them: north-south,
// east-west and the four turns. Wire k only ever joins wire k.
//
// A pass-gate network is bidirectional; this two-state model splits every
// segment into two directed signals, one heading into the crossing (in_*) and
// one leaving it (out_*). A signal arriving from one side leaves on each
// other side whose transistor is on, and signals reaching the same side are
// OR-merged. This is exact as long as every routed net is a tree with one
// driver, which is how a pass-gate fabric is used; a configuration that closes
// a ring of switches makes a combinational loop. Purely combinational.
module tps_switch
  import fpga_pkg::*;
(
  input  corner_cfg_t       cfg,
  input  logic [CHAN_W-1:0] in_n, in_s, in_e, in_w,     // arriving from each side
  output logic [CHAN_W-1:0] out_n, out_s, out_e, out_w  // leaving towards each side
);

  always_comb begin
    for (int k = 0; k < CHAN_W; k++) begin
      out_n[k] = (cfg[k].ns & in_s[k]) | (cfg[k].ne & in_e[k]) | (cfg[k].nw & in_w[k]);
      out_s[k] = (cfg[k].ns & in_n[k]) | (cfg[k].se & in_e[k]) | (cfg[k].sw & in_w[k]);
      out_e[k] = (cfg[k].ew & in_w[k]) | (cfg[k].ne & in_n[k]) | (cfg[k].se & in_s[k]);
      out_w[k] = (cfg[k].ew & in_e[k]) | (cfg[k].nw & in_n[k]) | (cfg[k].sw & in_s[k]);
    end
  end

endmodule
