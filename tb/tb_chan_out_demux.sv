// Self-checking testbench for chan_out_demux: both output values with every
// one-hot select and the all-zero select; only the selected wire may carry
// the value, all others must read 0.
module tb_chan_out_demux;
  import fpga_pkg::*;
  logic out_cluster;
  logic [CHAN_W-1:0] sel, drive;
  int checks = 0, failures = 0;

  chan_out_demux dut (.out_cluster, .sel, .drive);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      for (int s = -1; s < int'(CHAN_W); s++) begin
        out_cluster = v[0];
        sel = (s < 0) ? '0 : CHAN_W'(1 << s);
        #1;
        for (int k = 0; k < int'(CHAN_W); k++) begin
          checks++;
          if (drive[k] !== ((k == s) && v[0])) begin
            failures++; $display("v=%0d sel=%b wire %0d got %b", v, sel, k, drive[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
