// Logic cluster: three 4-input LUTs with their input selection and output
// stages.
//
// LUT n (n = 1..3) has four inputs InLUTn1..InLUTn4. Each comes from a 4-1
// mux (lut_in_mux) that picks either the cluster pin Data<n><i> or one of the
// three cluster outputs OutCluster1..3, so LUT results can be chained inside
// the cluster or fed back to build state machines. Each LUT output goes to a
// flip-flop and to a 2-1 mux (lut_out_stage) selected by b<n>, giving
// OutCluster<n> either registered or combinational. The LUTs are written with
// W high: the LUT inputs address a cell and Pin<n> is stored in it. They are
// read with R high.
//
// The LUT count, the input and output muxes and the W/R/Pin/b/clock signals
// follow the architecture. The select encodings, the flip-flop reset and the
// clocked LUT write are this design's choices.
//
// Timing: combinational from Data/selects to OutCluster when b is low; one
// clock of latency when b is high. Because the LUT inputs can select the
// cluster's own outputs, there is a structural combinational path from
// OutCluster back to OutCluster. It only becomes a real loop if a bypassed
// output is configured to feed its own LUT; that configuration must be
// avoided, as in any LUT fabric, so the loop warning of lint tools stands.
module cluster
  import fpga_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic w,                                          // write enable of all three LUTs
  input  logic r,                                          // read enable of all three LUTs
  input  logic [LUTS_PER_CLUSTER-1:0]            pin,      // Pin1..Pin3, LUT write data
  input  logic [LUTS_PER_CLUSTER-1:0][LUT_K-1:0] data,     // data[n-1][i-1] = Data<n><i>
  input  lut_sel_t [LUTS_PER_CLUSTER-1:0][LUT_K-1:0] s,    // s[n-1][i-1] = s<n><i>1..s<n><i>4
  input  logic [LUTS_PER_CLUSTER-1:0]            b,        // b1..b3
  output logic [LUTS_PER_CLUSTER-1:0]            out_cluster, // OutCluster1..3
  output logic [LUTS_PER_CLUSTER-1:0]            out_lut,     // OutLUT of each LUT
  output logic [LUTS_PER_CLUSTER-1:0]            q            // flip-flop of each LUT
);

  logic [LUTS_PER_CLUSTER-1:0][LUT_K-1:0] in_lut;

  for (genvar n = 0; n < LUTS_PER_CLUSTER; n++) begin : g_lut
    for (genvar i = 0; i < LUT_K; i++) begin : g_in
      lut_in_mux u_in_mux (
        .data       (data[n][i]),
        .out_cluster(out_cluster),
        .sel        (s[n][i]),
        .in_lut     (in_lut[n][i])
      );
      a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s[n][i]))
        else $error("cluster: LUT input mux select is not one-hot");
    end

    lut4 u_lut (
      .clk    (clk),
      .w      (w),
      .r      (r),
      .pin    (pin[n]),
      .in_lut (in_lut[n]),
      .out_lut(out_lut[n]),
      .cells  ()
    );

    lut_out_stage u_out (
      .clk        (clk),
      .rst_n      (rst_n),
      .b          (b[n]),
      .out_lut    (out_lut[n]),
      .q          (q[n]),
      .out_cluster(out_cluster[n])
    );
  end

endmodule
