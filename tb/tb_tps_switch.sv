// Self-checking testbench for tps_switch. Random switch settings and random
// arriving values; the expected value leaving each side is worked out from a
// table of which side pairs each of the six transistors joins.
module tb_tps_switch;
  import fpga_pkg::*;
  corner_cfg_t cfg;
  logic [CHAN_W-1:0] in_n, in_s, in_e, in_w, out_n, out_s, out_e, out_w;
  int checks = 0, failures = 0;

  tps_switch dut (.cfg, .in_n, .in_s, .in_e, .in_w, .out_n, .out_s, .out_e, .out_w);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sides: 0 = north, 1 = south, 2 = east, 3 = west.
  // Transistor t joins sides pa[t] and pb[t], in the order ns, ew, ne, nw, se, sw.
  int pa [6] = '{0, 2, 0, 0, 1, 1};
  int pb [6] = '{1, 3, 2, 3, 2, 3};

  initial begin
    logic [3:0] arr, exp;
    logic [5:0] on;
    for (int t = 0; t < 2000; t++) begin
      cfg = corner_cfg_t'({$urandom, $urandom});
      in_n = CHAN_W'($urandom); in_s = CHAN_W'($urandom);
      in_e = CHAN_W'($urandom); in_w = CHAN_W'($urandom);
      #1;
      for (int k = 0; k < int'(CHAN_W); k++) begin
        arr = {in_w[k], in_e[k], in_s[k], in_n[k]};
        on  = {cfg[k].ns, cfg[k].ew, cfg[k].ne, cfg[k].nw, cfg[k].se, cfg[k].sw};
        exp = '0;
        for (int x = 0; x < 6; x++) begin
          if (on[5-x]) begin
            exp[pa[x]] |= arr[pb[x]];
            exp[pb[x]] |= arr[pa[x]];
          end
        end
        checks++;
        if ({out_w[k], out_e[k], out_s[k], out_n[k]} !== exp) begin
          failures++;
          $display("t=%0d wire %0d cfg=%b in=%b got %b exp %b", t, k, on, arr,
                   {out_w[k], out_e[k], out_s[k], out_n[k]}, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
