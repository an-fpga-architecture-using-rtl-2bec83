// Self-checking testbench for mem_cell: random write / read sequences
// compared against a one-bit reference, including writes with the cell not
// selected or W low (which must not change it) and reads with R low (which
// must give 0). A write must be visible right after the clock edge.
module tb_mem_cell;
  logic clk = 0, w, sel, din, r, q, out_cell;
  logic ref_q;
  int checks = 0, failures = 0;

  mem_cell dut (.clk, .w, .sel, .din, .r, .q, .out_cell);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Initialise the cell with a definite value.
    w = 1; sel = 1; din = 0; r = 0;
    @(posedge clk); #1;
    ref_q = 0;
    for (int t = 0; t < 500; t++) begin
      w = $urandom_range(0, 1); sel = $urandom_range(0, 1);
      din = $urandom_range(0, 1); r = $urandom_range(0, 1);
      #1;
      checks++;
      if (out_cell !== (r & ref_q)) begin
        failures++; $display("read mismatch t=%0d r=%b got %b exp %b", t, r, out_cell, r & ref_q);
      end
      @(posedge clk); #1;
      if (w && sel) ref_q = din;
      checks++;
      if (q !== ref_q) begin
        failures++; $display("store mismatch t=%0d got %b exp %b", t, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
