// Self-checking testbench for lut_out_stage: random LUT output and b select.
// With b low the output must follow the input in the same cycle (bypass);
// with b high it must show the value sampled at the previous clock edge
// (one cycle of latency). Reset must clear the flip-flop.
module tb_lut_out_stage;
  logic clk = 0, rst_n, b, out_lut, q, out_cluster;
  logic prev;
  int checks = 0, failures = 0;

  lut_out_stage dut (.clk, .rst_n, .b, .out_lut, .q, .out_cluster);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; b = 1; out_lut = 1;
    #2;
    checks++;
    if (q !== 1'b0 || out_cluster !== 1'b0) begin
      failures++; $display("reset did not clear the flip-flop");
    end
    @(negedge clk) begin rst_n = 1; out_lut = 0; end
    prev = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      out_lut = $urandom_range(0, 1);
      b = $urandom_range(0, 1);
      #1;
      checks++;
      if (out_cluster !== (b ? prev : out_lut)) begin
        failures++; $display("t=%0d b=%b got %b exp %b", t, b, out_cluster, b ? prev : out_lut);
      end
      @(posedge clk); #1;
      prev = out_lut;
      checks++;
      if (q !== prev) begin
        failures++; $display("t=%0d flip-flop got %b exp %b", t, q, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
