// Connection from a routing channel to one cluster Data input: an 8-1
// pass-gate mux that picks one of the channel's eight wires.
//
// The select is one-hot (one pass gate per wire). With no select line high
// the Data input is left unconnected; the model then gives 0. Several select
// lines high would short wires together and is flagged by an assertion in
// the cluster array. Purely combinational.
module chan_in_mux
  import fpga_pkg::*;
(
  input  logic [CHAN_W-1:0] wires,  // line1 = wires[0] ... line8 = wires[7]
  input  logic [CHAN_W-1:0] sel,    // one-hot
  output logic              data    // cluster Data pin
);

  assign data = |(wires & sel);

endmodule
