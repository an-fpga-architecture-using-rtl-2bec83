// LUT input selector of a cluster: a 4-1 pass-gate mux followed by two
// restoring inverters (DataBar, then InLUT).
//
// Each LUT input chooses between its own Data pin and the three cluster
// outputs OutCluster1..3, which lets a LUT take the result of a neighbouring
// LUT, or its own, inside the cluster. The select lines are one-hot: sel[0]
// picks the Data pin and sel[1..3] pick OutCluster1..3 (that assignment is
// this design's choice). With no select line high the pass gates leave the
// mux input floating; the model then gives 0. The two inverters restore the
// level lost in the pass gates and cancel out logically. Purely combinational.
module lut_in_mux
  import fpga_pkg::*;
(
  input  logic              data,       // Data pin of the cluster
  input  logic [2:0]        out_cluster,// OutCluster1..3 fed back
  input  lut_sel_t          sel,        // one-hot select
  output logic              in_lut      // to the LUT input
);

  logic data_bar;

  always_comb begin
    data_bar = ~|(sel & {out_cluster, data});
    in_lut   = ~data_bar;
  end

endmodule
