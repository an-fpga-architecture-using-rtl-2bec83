// Output stage of one LUT in a cluster: a D flip-flop on OutLUT and a 2-1 mux
// that drives OutCluster with either the registered value or the LUT output
// itself (the bypass path).
//
// The flip-flop takes OutLUT on the rising clock edge. With b high the
// cluster output is the flip-flop output Q, with b low it is OutLUT directly;
// which value of b picks which input, and the asynchronous active-low reset
// of the flip-flop, are this design's choices.
module lut_out_stage (
  input  logic clk,
  input  logic rst_n,       // asynchronous, active low: clears the flip-flop
  input  logic b,           // 1: registered, 0: bypass
  input  logic out_lut,     // LUT output
  output logic q,           // flip-flop output
  output logic out_cluster  // OutCluster
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= out_lut;
  end

  assign out_cluster = b ? q : out_lut;

endmodule
