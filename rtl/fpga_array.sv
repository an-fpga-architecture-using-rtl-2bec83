// Top level of the nanowire FPGA fabric: a ROWS x COLS array of logic
// clusters joined by eight-wire routing channels and traffic pole switches.
//
// Geometry. Cluster (r,c) sits in a square framed by four channel segments:
//   top    : horizontal segment hseg[r][c]   -> Data11..Data14 (LUT 1 inputs)
//   left   : vertical segment   vseg[r][c]   -> Data21..Data24 (LUT 2 inputs)
//   bottom : horizontal segment hseg[r+1][c] -> Data31..Data34 (LUT 3 inputs)
//   right  : vertical segment   vseg[r][c+1] <- OutCluster1..3
// Each Data pin reads its segment through an 8-1 mux (chan_in_mux), each
// OutCluster drives the right-hand segment through a 1-8 demux
// (chan_out_demux), so the right-hand channel of one cluster is the
// left-hand channel of its neighbour. At every crossing (ROWS+1 x COLS+1 of
// them) a tps_switch joins the four segments that meet there, wire by wire.
// Wires leaving the array at its four edges are brought out as edge ports:
// *_in drives the wire into the array, *_out is what reaches the edge.
//
// The cluster-to-channel assignment follows the architecture's drawing of a
// cluster; the array size (5 x 5 here), per-cluster W/R/Pin ports and the
// configuration ports are this design's choices. Configuration bits are
// plain inputs; how they are stored is not part of this design.
//
// Routing model. Every segment wire is carried as two directed signals, one
// per direction, and all drivers of a segment are OR-merged (an undriven
// wire reads 0). This gives the pass-gate network's behaviour for every
// configuration in which each routed net is a tree with a single driver.
// Because signals may turn at any crossing, the routing graph has structural
// combinational loops (rings of switches around a cluster, and cluster
// outputs that come back to cluster inputs). They are inherent to a
// programmable fabric and are only real loops in a configuration that closes
// a ring; lint loop warnings on this module therefore stand.
//
// Timing: everything from edge inputs to Data pins and from OutCluster to
// other clusters is combinational; the only state is the LUT cells and the
// cluster flip-flops, all on clk.
module fpga_array
  import fpga_pkg::*;
#(
  parameter int unsigned ROWS = 5,
  parameter int unsigned COLS = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  cluster_cfg_t cfg      [ROWS][COLS],
  input  corner_cfg_t  tps_cfg  [ROWS+1][COLS+1],
  input  logic         w        [ROWS][COLS],
  input  logic         r        [ROWS][COLS],
  input  logic [LUTS_PER_CLUSTER-1:0] pin [ROWS][COLS],
  output logic [LUTS_PER_CLUSTER-1:0] out_cluster [ROWS][COLS],
  input  logic [CHAN_W-1:0] edge_n_in  [COLS+1],
  output logic [CHAN_W-1:0] edge_n_out [COLS+1],
  input  logic [CHAN_W-1:0] edge_s_in  [COLS+1],
  output logic [CHAN_W-1:0] edge_s_out [COLS+1],
  input  logic [CHAN_W-1:0] edge_w_in  [ROWS+1],
  output logic [CHAN_W-1:0] edge_w_out [ROWS+1],
  input  logic [CHAN_W-1:0] edge_e_in  [ROWS+1],
  output logic [CHAN_W-1:0] edge_e_out [ROWS+1]
);

  // Directed signals at each crossing.
  logic [CHAN_W-1:0] c_in_n  [ROWS+1][COLS+1];
  logic [CHAN_W-1:0] c_in_s  [ROWS+1][COLS+1];
  logic [CHAN_W-1:0] c_in_e  [ROWS+1][COLS+1];
  logic [CHAN_W-1:0] c_in_w  [ROWS+1][COLS+1];
  logic [CHAN_W-1:0] c_out_n [ROWS+1][COLS+1];
  logic [CHAN_W-1:0] c_out_s [ROWS+1][COLS+1];
  logic [CHAN_W-1:0] c_out_e [ROWS+1][COLS+1];
  logic [CHAN_W-1:0] c_out_w [ROWS+1][COLS+1];

  // Cluster output drive onto vertical segments; vseg[i][0] has no cluster on its left.
  logic [CHAN_W-1:0] inj  [ROWS][COLS+1];
  // Value seen by taps on each segment.
  logic [CHAN_W-1:0] hseg [ROWS+1][COLS];
  logic [CHAN_W-1:0] vseg [ROWS][COLS+1];

  // ---------------------------------------------------------------- crossings
  for (genvar i = 0; i <= ROWS; i++) begin : g_crow
    for (genvar j = 0; j <= COLS; j++) begin : g_ccol
      if (i == 0) begin : g_n_edge
        assign c_in_n[i][j]  = edge_n_in[j];
        assign edge_n_out[j] = c_out_n[i][j];
      end else begin : g_n_seg
        assign c_in_n[i][j] = c_out_s[i-1][j] | inj[i-1][j];
      end

      if (i == ROWS) begin : g_s_edge
        assign c_in_s[i][j]  = edge_s_in[j];
        assign edge_s_out[j] = c_out_s[i][j];
      end else begin : g_s_seg
        assign c_in_s[i][j] = c_out_n[i+1][j] | inj[i][j];
      end

      if (j == 0) begin : g_w_edge
        assign c_in_w[i][j]  = edge_w_in[i];
        assign edge_w_out[i] = c_out_w[i][j];
      end else begin : g_w_seg
        assign c_in_w[i][j] = c_out_e[i][j-1];
      end

      if (j == COLS) begin : g_e_edge
        assign c_in_e[i][j]  = edge_e_in[i];
        assign edge_e_out[i] = c_out_e[i][j];
      end else begin : g_e_seg
        assign c_in_e[i][j] = c_out_w[i][j+1];
      end

      tps_switch u_tps (
        .cfg  (tps_cfg[i][j]),
        .in_n (c_in_n[i][j]),
        .in_s (c_in_s[i][j]),
        .in_e (c_in_e[i][j]),
        .in_w (c_in_w[i][j]),
        .out_n(c_out_n[i][j]),
        .out_s(c_out_s[i][j]),
        .out_e(c_out_e[i][j]),
        .out_w(c_out_w[i][j])
      );
    end
  end

  // ---------------------------------------------------------------- segments
  for (genvar i = 0; i <= ROWS; i++) begin : g_hrow
    for (genvar j = 0; j < COLS; j++) begin : g_hcol
      assign hseg[i][j] = c_out_e[i][j] | c_out_w[i][j+1];
    end
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_vrow
    for (genvar j = 0; j <= COLS; j++) begin : g_vcol
      assign vseg[i][j] = c_out_s[i][j] | c_out_n[i+1][j] | inj[i][j];
    end
    assign inj[i][0] = '0;
  end

  // ---------------------------------------------------------------- clusters
  for (genvar rr = 0; rr < ROWS; rr++) begin : g_row
    for (genvar cc = 0; cc < COLS; cc++) begin : g_col
      logic [LUTS_PER_CLUSTER-1:0][LUT_K-1:0] data;
      logic [LUTS_PER_CLUSTER-1:0][CHAN_W-1:0] drive;
      logic [LUTS_PER_CLUSTER-1:0] out_lut_unused, q_unused;

      for (genvar i = 0; i < LUT_K; i++) begin : g_din
        chan_in_mux u_top (
          .wires(hseg[rr][cc]),   .sel(cfg[rr][cc].in_sel[0][i]), .data(data[0][i]));
        chan_in_mux u_left (
          .wires(vseg[rr][cc]),   .sel(cfg[rr][cc].in_sel[1][i]), .data(data[1][i]));
        chan_in_mux u_bottom (
          .wires(hseg[rr+1][cc]), .sel(cfg[rr][cc].in_sel[2][i]), .data(data[2][i]));
        for (genvar n = 0; n < LUTS_PER_CLUSTER; n++) begin : g_chk
          a_in_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                                        $onehot0(cfg[rr][cc].in_sel[n][i]))
            else $error("fpga_array: channel input mux select is not one-hot");
        end
      end

      for (genvar n = 0; n < LUTS_PER_CLUSTER; n++) begin : g_dout
        chan_out_demux u_demux (
          .out_cluster(out_cluster[rr][cc][n]),
          .sel        (cfg[rr][cc].out_sel[n]),
          .drive      (drive[n])
        );
        a_out_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                                       $onehot0(cfg[rr][cc].out_sel[n]))
          else $error("fpga_array: output demux select is not one-hot");
      end

      assign inj[rr][cc+1] = drive[0] | drive[1] | drive[2];

      cluster u_cluster (
        .clk        (clk),
        .rst_n      (rst_n),
        .w          (w[rr][cc]),
        .r          (r[rr][cc]),
        .pin        (pin[rr][cc]),
        .data       (data),
        .s          (cfg[rr][cc].s),
        .b          (cfg[rr][cc].b),
        .out_cluster(out_cluster[rr][cc]),
        .out_lut    (out_lut_unused),
        .q          (q_unused)
      );
    end
  end

endmodule
