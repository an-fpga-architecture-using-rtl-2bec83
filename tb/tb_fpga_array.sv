// End-to-end testbench for fpga_array at its default size (5 x 5 clusters).
//
//   Programming : every crossing passes all wires straight through; the west
//                 edge drives an address on wires 1-4 of every horizontal
//                 channel and the north edge on wires 1-4 of every vertical
//                 channel. Each Data pin reads the wire of its own index, so
//                 all 75 LUTs are written in 16 clocks with random tables.
//   Array read  : random addresses on all channels; every OutCluster is
//                 checked in bypass mode and in registered mode, and the
//                 values leaving the east and south edges are checked.
//   Routes      : with the array still reading, cluster outputs are sent
//                 over the channels through turning switches:
//                 - diagonal, three cluster lengths: (0,0) -> (3,3) over wire
//                   6: output demux, five switches, input mux;
//                 - diagonal, four cluster lengths: (0,0) -> (4,4), wire 7;
//                 - diagonal, one cluster length: (3,3) -> (4,4), wire 5;
//                 - fan-out of three: (0,0) -> (0,1), (1,1), (2,1), wire 8.
//   In-cluster  : cluster (1,3) chains LUT 1 into LUT 2; cluster (4,0) runs
//                 LUT 3 as a toggle state machine on its own flip-flop.
// Expected values come from the reference tables and routes kept here.
// Each mechanism is counted, and one that never happened is a failure.
module tb_fpga_array;
  import fpga_pkg::*;
  localparam int R = 5, C = 5;

  logic clk = 0, rst_n;
  cluster_cfg_t cfg     [R][C];
  corner_cfg_t  tps_cfg [R+1][C+1];
  logic         w [R][C], r [R][C];
  logic [2:0]   pin [R][C];
  logic [2:0]   out_cluster [R][C];
  logic [7:0]   edge_n_in [C+1], edge_n_out [C+1], edge_s_in [C+1], edge_s_out [C+1];
  logic [7:0]   edge_w_in [R+1], edge_w_out [R+1], edge_e_in [R+1], edge_e_out [R+1];

  fpga_array dut (.*);

  logic [15:0] tbl [R][C][3];
  logic [3:0]  ha [R+1];   // address carried by horizontal channel i
  logic [3:0]  va [C+1];   // address carried by vertical channel j
  int checks = 0, failures = 0;

  typedef enum int {
    M_WRITE, M_BYPASS, M_REG, M_STRAIGHT, M_DIAG1, M_DIAG3, M_DIAG4,
    M_FANOUT3, M_CHAIN, M_TOGGLE, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"LUT write", "bypass read", "registered read",
                               "straight-through switch", "diagonal route 1",
                               "diagonal route 3", "diagonal route 4",
                               "fan-out 3", "LUT chain in cluster", "toggle state machine"};

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b exp %b", what, got, exp);
    end
  endtask

  function automatic logic lut_val(int rr, int cc, int n, logic [3:0] a);
    return tbl[rr][cc][n][a];
  endfunction

  // Cluster LUT address from the channel addresses (no routed inputs).
  function automatic logic [3:0] base_addr(int rr, int cc, int n);
    case (n)
      0: return ha[rr];
      1: return va[cc];
      default: return ha[rr+1];
    endcase
  endfunction

  task automatic drive_edges();
    for (int i = 0; i <= R; i++) begin
      edge_w_in[i] = {4'b0, ha[i]};
      edge_e_in[i] = '0;
    end
    for (int j = 0; j <= C; j++) begin
      edge_n_in[j] = {4'b0, va[j]};
      edge_s_in[j] = '0;
    end
  endtask

  task automatic random_addresses();
    for (int i = 0; i <= R; i++) ha[i] = 4'($urandom);
    for (int j = 0; j <= C; j++) va[j] = 4'($urandom);
    drive_edges();
  endtask

  // Straight-through crossings, Data pin i reads wire i, all LUT inputs from Data.
  task automatic base_config();
    for (int i = 0; i <= R; i++)
      for (int j = 0; j <= C; j++)
        for (int k = 0; k < 8; k++)
          tps_cfg[i][j][k] = (k < 4) ? '{ns: 1'b1, ew: 1'b1, default: 1'b0} : '0;
    for (int rr = 0; rr < R; rr++)
      for (int cc = 0; cc < C; cc++) begin
        cfg[rr][cc] = '0;
        for (int n = 0; n < 3; n++)
          for (int i = 0; i < 4; i++) begin
            cfg[rr][cc].s[n][i]      = 4'b0001;
            cfg[rr][cc].in_sel[n][i] = 8'(1 << i);
          end
      end
  endtask

  task automatic set_all_b(input logic v);
    for (int rr = 0; rr < R; rr++)
      for (int cc = 0; cc < C; cc++) cfg[rr][cc].b = {3{v}};
  endtask

  // Reads all outputs and edge wires against the tables.
  task automatic check_array(input logic registered, input logic [2:0] expq [R][C]);
    for (int rr = 0; rr < R; rr++)
      for (int cc = 0; cc < C; cc++)
        for (int n = 0; n < 3; n++) begin
          check(out_cluster[rr][cc][n],
                registered ? expq[rr][cc][n] : lut_val(rr, cc, n, base_addr(rr, cc, n)),
                $sformatf("cluster (%0d,%0d) LUT %0d", rr, cc, n + 1));
          mech[registered ? M_REG : M_BYPASS]++;
        end
    for (int i = 0; i <= R; i++) begin
      checks++;
      if (edge_e_out[i][3:0] !== ha[i]) begin
        failures++; $display("east edge %0d got %h exp %h", i, edge_e_out[i][3:0], ha[i]);
      end else mech[M_STRAIGHT]++;
    end
    for (int j = 0; j <= C; j++) begin
      checks++;
      if (edge_s_out[j][3:0] !== va[j]) begin
        failures++; $display("south edge %0d got %h exp %h", j, edge_s_out[j][3:0], va[j]);
      end else mech[M_STRAIGHT]++;
    end
  endtask

  initial begin
    logic [2:0] expq [R][C];
    logic src1, src2, src3, t_prev;
    rst_n = 0;
    base_config();
    set_all_b(1'b0);
    for (int rr = 0; rr < R; rr++)
      for (int cc = 0; cc < C; cc++) begin
        w[rr][cc] = 0; r[rr][cc] = 0; pin[rr][cc] = '0;
        for (int n = 0; n < 3; n++) tbl[rr][cc][n] = 16'($urandom);
      end
    // Cluster (4,0) LUT 3: output = not(input 1).
    tbl[4][0][2] = 16'h5555;
    for (int i = 0; i <= R; i++) ha[i] = '0;
    for (int j = 0; j <= C; j++) va[j] = '0;
    drive_edges();
    @(posedge clk); #1 rst_n = 1;

    // ---------------------------------------------------------- programming
    for (int a = 0; a < 16; a++) begin
      for (int i = 0; i <= R; i++) ha[i] = 4'(a);
      for (int j = 0; j <= C; j++) va[j] = 4'(a);
      drive_edges();
      for (int rr = 0; rr < R; rr++)
        for (int cc = 0; cc < C; cc++) begin
          w[rr][cc] = 1;
          for (int n = 0; n < 3; n++) pin[rr][cc][n] = tbl[rr][cc][n][a];
        end
      @(posedge clk); #1;
      mech[M_WRITE] += R * C * 3;
    end
    for (int rr = 0; rr < R; rr++)
      for (int cc = 0; cc < C; cc++) begin
        w[rr][cc] = 0; r[rr][cc] = 1;
      end

    // ---------------------------------------------------------- array read
    for (int t = 0; t < 20; t++) begin
      random_addresses();
      #1 check_array(1'b0, expq);
    end
    set_all_b(1'b1);
    for (int t = 0; t < 20; t++) begin
      random_addresses();
      for (int rr = 0; rr < R; rr++)
        for (int cc = 0; cc < C; cc++)
          for (int n = 0; n < 3; n++) expq[rr][cc][n] = lut_val(rr, cc, n, base_addr(rr, cc, n));
      @(posedge clk); #1;
      random_addresses();   // new addresses must not reach registered outputs yet
      #1 check_array(1'b1, expq);
    end
    set_all_b(1'b0);

    // ---------------------------------------------------------- routes
    // Diagonal 3 on wire index 5: (0,0) LUT 1 -> vseg[0][1] -> (1,1) N->E,
    // (1,2) W->S, (2,2) N->E, (2,3) W->S, (3,3) N->S -> vseg[3][3] -> (3,3) Data21.
    cfg[0][0].out_sel[0] = 8'b0010_0000;
    tps_cfg[1][1][5].ne = 1; tps_cfg[1][2][5].sw = 1; tps_cfg[2][2][5].ne = 1;
    tps_cfg[2][3][5].sw = 1; tps_cfg[3][3][5].ns = 1;
    cfg[3][3].in_sel[1][0] = 8'b0010_0000;
    // Diagonal 4 on wire index 6: (0,0) LUT 2 -> (4,4) Data21.
    cfg[0][0].out_sel[1] = 8'b0100_0000;
    tps_cfg[1][1][6].ne = 1; tps_cfg[1][2][6].sw = 1; tps_cfg[2][2][6].ne = 1;
    tps_cfg[2][3][6].sw = 1; tps_cfg[3][3][6].ne = 1; tps_cfg[3][4][6].sw = 1;
    tps_cfg[4][4][6].ns = 1;
    cfg[4][4].in_sel[1][0] = 8'b0100_0000;
    // Diagonal 1 on wire index 4: (3,3) LUT 3 -> vseg[3][4] -> (4,4) N->S -> (4,4) Data22.
    cfg[3][3].out_sel[2] = 8'b0001_0000;
    tps_cfg[4][4][4].ns = 1;
    cfg[4][4].in_sel[1][1] = 8'b0001_0000;
    // Fan-out 3 on wire index 7: (0,0) LUT 3 -> vseg[0][1], vseg[1][1], vseg[2][1]
    // -> Data21 of (0,1), (1,1), (2,1).
    cfg[0][0].out_sel[2] = 8'b1000_0000;
    tps_cfg[1][1][7].ns = 1; tps_cfg[2][1][7].ns = 1;
    for (int rr = 0; rr < 3; rr++) cfg[rr][1].in_sel[1][0] = 8'b1000_0000;
    // Cluster (1,3): LUT 2 input 1 takes OutCluster1.
    cfg[1][3].s[1][0] = 4'b0010;

    for (int t = 0; t < 40; t++) begin
      logic e;
      random_addresses();
      #1;
      src1 = lut_val(0, 0, 0, ha[0]);
      src2 = lut_val(0, 0, 1, va[0]);
      src3 = lut_val(0, 0, 2, ha[1]);
      e = lut_val(3, 3, 1, {va[3][3:1], src1});
      check(out_cluster[3][3][1], e, "diagonal 3 route");
      mech[M_DIAG3] += int'(src1);
      // (4,4) LUT 2 input 1 from the diagonal-4 route, input 2 from the diagonal-1 route.
      e = lut_val(4, 4, 1, {va[4][3:2], lut_val(3, 3, 2, ha[4]), src2});
      check(out_cluster[4][4][1], e, "diagonal 4 and 1 routes");
      mech[M_DIAG4] += int'(src2);
      mech[M_DIAG1] += int'(lut_val(3, 3, 2, ha[4]));
      for (int rr = 0; rr < 3; rr++) begin
        e = lut_val(rr, 1, 1, {va[1][3:1], src3});
        check(out_cluster[rr][1][1], e, $sformatf("fan-out 3 sink (%0d,1)", rr));
      end
      mech[M_FANOUT3] += int'(src3);
      e = lut_val(1, 3, 1, {va[3][3:1], lut_val(1, 3, 0, ha[1])});
      check(out_cluster[1][3][1], e, "LUT chain in cluster (1,3)");
      mech[M_CHAIN]++;
      // A cluster off every route still reads its own channels.
      check(out_cluster[2][0][0], lut_val(2, 0, 0, ha[2]), "unrouted cluster (2,0)");
    end

    // ---------------------------------------------------------- state machine
    cfg[4][0].b[2] = 1;
    cfg[4][0].s[2][0] = 4'b1000;
    @(posedge clk); #1;
    t_prev = out_cluster[4][0][2];
    for (int t = 0; t < 20; t++) begin
      @(posedge clk); #1;
      check(out_cluster[4][0][2], ~t_prev, "toggle state machine");
      mech[M_TOGGLE]++;
      t_prev = out_cluster[4][0][2];
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-26s happened %0d times", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++; $display("mechanism %s never happened", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
