// Connection from a cluster output to its right-hand routing channel: a 1-8
// pass-gate demux that puts OutCluster onto one of the channel's eight wires.
//
// One pass gate per wire; sel is one-hot, all zero leaves the output
// unconnected. The model drives each selected wire with the output value and
// the others with 0, which is what the channel's OR-merge of drivers expects
// (see fpga_array). Purely combinational.
module chan_out_demux
  import fpga_pkg::*;
(
  input  logic              out_cluster, // OutCluster
  input  logic [CHAN_W-1:0] sel,         // one-hot
  output logic [CHAN_W-1:0] drive        // contribution to line1..line8
);

  assign drive = sel & {CHAN_W{out_cluster}};

endmodule
