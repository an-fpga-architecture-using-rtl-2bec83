// Shared constants and configuration types of the nanowire FPGA fabric.
//
// The fabric is an array of clusters. Every cluster holds three 4-input
// look-up tables (LUTs); every routing channel between clusters carries eight
// wires; at every channel crossing each wire has its own six-transistor
// "traffic pole" switch (TPS). The numbers 3, 4, 16 and 8 follow the
// architecture. How the configuration bits are stored is not part of the
// architecture: here they are plain inputs grouped into the structs below,
// and the selector encodings (one-hot, which input is select bit 0) are this
// design's own choice.
package fpga_pkg;

  localparam int unsigned LUTS_PER_CLUSTER = 3;   // LUTs (and outputs) per cluster
  localparam int unsigned LUT_K            = 4;   // inputs per LUT
  localparam int unsigned LUT_CELLS        = 16;  // memory cells per LUT (2**LUT_K)
  localparam int unsigned CHAN_W           = 8;   // wires per routing channel
  localparam int unsigned MUX4_W           = 4;   // inputs of a LUT input mux

  // One-hot selector of a LUT input mux.
  //   bit 0 : the cluster's own Data pin for this LUT input
  //   bit 1 : OutCluster1, bit 2 : OutCluster2, bit 3 : OutCluster3
  typedef logic [MUX4_W-1:0] lut_sel_t;

  // Per-cluster configuration.
  typedef struct packed {
    lut_sel_t [LUTS_PER_CLUSTER-1:0][LUT_K-1:0]    s;        // s<lut><input><k>
    logic     [LUTS_PER_CLUSTER-1:0]               b;        // 1: registered output, 0: bypass
    logic     [LUTS_PER_CLUSTER-1:0][LUT_K-1:0][CHAN_W-1:0] in_sel;  // Data pin <- channel wire, one-hot
    logic     [LUTS_PER_CLUSTER-1:0][CHAN_W-1:0]   out_sel;  // OutCluster -> right channel wire, one-hot
  } cluster_cfg_t;

  // The six pass transistors of one wire's traffic pole switch. Each joins
  // two of the four wire segments that meet at the crossing.
  typedef struct packed {
    logic ns;  // north - south
    logic ew;  // east  - west
    logic ne;  // north - east
    logic nw;  // north - west
    logic se;  // south - east
    logic sw;  // south - west
  } tps_cfg_t;

  typedef tps_cfg_t [CHAN_W-1:0] corner_cfg_t;

endpackage
