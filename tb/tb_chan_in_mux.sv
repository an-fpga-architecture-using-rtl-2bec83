// Self-checking testbench for chan_in_mux: random channel values with every
// one-hot select and the all-zero select.
module tb_chan_in_mux;
  import fpga_pkg::*;
  logic [CHAN_W-1:0] wires, sel;
  logic data;
  int checks = 0, failures = 0;

  chan_in_mux dut (.wires, .sel, .data);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int t = 0; t < 100; t++) begin
      wires = CHAN_W'($urandom);
      for (int s = -1; s < int'(CHAN_W); s++) begin
        sel = (s < 0) ? '0 : CHAN_W'(1 << s);
        exp = (s < 0) ? 1'b0 : wires[s];
        #1;
        checks++;
        if (data !== exp) begin
          failures++; $display("wires=%b sel=%b got %b exp %b", wires, sel, data, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
