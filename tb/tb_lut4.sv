// Self-checking testbench for lut4. Writes random 16-bit tables through the
// 1-16 write path (W high, address on the LUT inputs, data on Pin), one cell
// per clock, then reads every address with R high and compares with the
// table. Also checks that the output is 0 with R low and that a write is
// readable in the cycle right after its clock edge (one-cycle write latency).
module tb_lut4;
  import fpga_pkg::*;
  logic clk = 0, w, r, pin, out_lut;
  logic [LUT_K-1:0] in_lut;
  logic [LUT_CELLS-1:0] cells;
  logic [LUT_CELLS-1:0] table_ref;
  int checks = 0, failures = 0;

  lut4 dut (.clk, .w, .r, .pin, .in_lut, .out_lut, .cells);

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
      $display("%s: got %b exp %b (addr %0d)", what, got, exp, in_lut);
    end
  endtask

  initial begin
    w = 0; r = 0; pin = 0; in_lut = '0;
    for (int rep = 0; rep < 20; rep++) begin
      table_ref = (rep == 0) ? 16'hFFFF : (rep == 1) ? 16'h0000 : 16'($urandom);
      // Write phase.
      r = 0; w = 1;
      for (int a = 0; a < LUT_CELLS; a++) begin
        in_lut = LUT_K'(a); pin = table_ref[a];
        @(posedge clk); #1;
      end
      w = 0;
      checks++;
      if (cells !== table_ref) begin
        failures++; $display("stored table %h exp %h", cells, table_ref);
      end
      // Read phase, in a shuffled address order.
      r = 1;
      for (int k = 0; k < LUT_CELLS; k++) begin
        in_lut = LUT_K'((k * 7 + rep) % LUT_CELLS);
        #1 check(out_lut, table_ref[in_lut], "read");
      end
      // Output disabled.
      r = 0;
      for (int a = 0; a < LUT_CELLS; a++) begin
        in_lut = LUT_K'(a);
        #1 check(out_lut, 1'b0, "read disabled");
      end
      @(posedge clk); #1;
    end
    // Write latency: write one cell, read it right after the edge.
    in_lut = 4'd9; pin = ~table_ref[9]; w = 1;
    @(posedge clk); #1;
    w = 0; r = 1;
    #1 check(out_lut, ~table_ref[9], "one-cycle write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
