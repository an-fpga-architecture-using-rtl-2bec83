// Self-checking testbench for lut_in_mux: every combination of the four
// inputs with every one-hot select (and the all-zero select, which reads 0).
module tb_lut_in_mux;
  import fpga_pkg::*;
  logic data, in_lut;
  logic [2:0] out_cluster;
  lut_sel_t sel;
  int checks = 0, failures = 0;

  lut_in_mux dut (.data, .out_cluster, .sel, .in_lut);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] srcs;
    logic exp;
    for (int v = 0; v < 16; v++) begin
      for (int s = -1; s < 4; s++) begin
        srcs = 4'(v);
        data = srcs[0]; out_cluster = srcs[3:1];
        sel = (s < 0) ? '0 : lut_sel_t'(1 << s);
        exp = (s < 0) ? 1'b0 : srcs[s];
        #1;
        checks++;
        if (in_lut !== exp) begin
          failures++; $display("v=%h sel=%b got %b exp %b", v, sel, in_lut, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
