// One memory cell of a LUT (M0..M15).
//
// The cell is a cross-coupled inverter pair. It is written through a pass
// transistor from the restoring inverter of the LUT's shared write path when
// W is high and the LUT inputs address this cell (sel), and it drives the
// LUT's read tree through an R-enabled tri-state inverter.
//
// Digital model: the storage node is a flip-flop loaded on the rising clock
// edge when w & sel (the static cell written level-sensitively is replaced by
// a clocked write, this design's choice). The read output is the stored bit
// while r is high and 0 while r is low, standing in for the floating
// tri-state output. The cell has no reset, like the SRAM cell it models:
// configure it before reading it.
module mem_cell (
  input  logic clk,
  input  logic w,      // write enable of the LUT
  input  logic sel,    // this cell is addressed by the LUT inputs
  input  logic din,    // write data (Pin of the LUT)
  input  logic r,      // read enable of the LUT
  output logic q,      // stored bit ("Cell" node)
  output logic out_cell // read output ("OutCell" node), 0 when not read-enabled
);

  always_ff @(posedge clk) begin
    if (w && sel) q <= din;
  end

  assign out_cell = r & q;

endmodule
