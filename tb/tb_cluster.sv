// Self-checking testbench for cluster.
//   1. Programs the three LUTs with random tables through the write path
//      (W high, address on Data pins, table bit on Pin), 16 clocks.
//   2. Reads with b low (bypass, same cycle) and b high (registered, one
//      clock later) from random Data values.
//   3. Chains LUT 1 into LUT 2 inside the cluster (LUT 2 input 1 selects
//      OutCluster1) and checks the composed function.
//   4. Builds a one-bit state machine: LUT 3 is reprogrammed as an inverter
//      of its input 1, which selects its own registered output, so
//      OutCluster3 must toggle on every clock.
// Expected values come from the reference tables kept in the testbench.
module tb_cluster;
  import fpga_pkg::*;
  logic clk = 0, rst_n, w, r;
  logic [2:0] pin, b, out_cluster, out_lut, q;
  logic [2:0][3:0] data;
  lut_sel_t [2:0][3:0] s;
  logic [15:0] tbl [3];
  int checks = 0, failures = 0;

  cluster dut (.clk, .rst_n, .w, .r, .pin, .data, .s, .b, .out_cluster, .out_lut, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [2:0] got, input logic [2:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b exp %b (data %h)", what, got, exp, data);
    end
  endtask

  // All LUT inputs from the Data pins.
  task automatic sel_data();
    for (int n = 0; n < 3; n++) for (int i = 0; i < 4; i++) s[n][i] = 4'b0001;
  endtask

  task automatic program_luts();
    sel_data();
    r = 0; w = 1;
    for (int a = 0; a < 16; a++) begin
      for (int n = 0; n < 3; n++) begin
        data[n] = 4'(a);
        pin[n]  = tbl[n][a];
      end
      @(posedge clk); #1;
    end
    w = 0; r = 1;
  endtask

  initial begin
    logic [2:0] exp, prev;
    logic [3:0] a2;
    rst_n = 0; w = 0; r = 0; pin = '0; b = '0; data = '0;
    sel_data();
    @(posedge clk); #1 rst_n = 1;

    for (int rep = 0; rep < 5; rep++) begin
      for (int n = 0; n < 3; n++) tbl[n] = 16'($urandom);
      program_luts();

      // Bypass reads.
      b = 3'b000;
      for (int t = 0; t < 50; t++) begin
        data = 12'($urandom);
        #1;
        for (int n = 0; n < 3; n++) exp[n] = tbl[n][data[n]];
        check(out_cluster, exp, "bypass read");
      end

      // Registered reads: value appears one clock after it is presented.
      b = 3'b111;
      data = 12'($urandom);
      @(posedge clk); #1;
      for (int n = 0; n < 3; n++) prev[n] = tbl[n][data[n]];
      for (int t = 0; t < 50; t++) begin
        check(out_cluster, prev, "registered read");
        data = 12'($urandom);
        #1;
        check(out_cluster, prev, "registered output holds until the edge");
        @(posedge clk); #1;
        for (int n = 0; n < 3; n++) prev[n] = tbl[n][data[n]];
      end

      // LUT 1 feeding LUT 2 input 1 through the cluster feedback.
      b = 3'b000;
      s[1][0] = 4'b0010;
      for (int t = 0; t < 50; t++) begin
        data = 12'($urandom);
        #1;
        a2 = {data[1][3:1], tbl[0][data[0]]};
        check(out_cluster[1:0], {tbl[1][a2], tbl[0][data[0]]}, "LUT1 -> LUT2 chain");
      end
      sel_data();
    end

    // Toggle state machine on LUT 3: out = not(input 1), input 1 = OutCluster3 registered.
    tbl[2] = 16'h5555;
    program_luts();
    b = 3'b100;
    data = '0;
    s[2][0] = 4'b1000;
    @(posedge clk); #1;
    prev = out_cluster;
    for (int t = 0; t < 20; t++) begin
      @(posedge clk); #1;
      checks++;
      if (out_cluster[2] !== ~prev[2]) begin
        failures++; $display("toggle t=%0d got %b prev %b", t, out_cluster[2], prev[2]);
      end
      prev = out_cluster;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
