// 4-input look-up table built from 16 memory cells.
//
// The cells M0..M15 hang off a binary tree of pass transistors. Reading, the
// tree acts as a 16-1 mux whose levels are steered by InLUT1 (nearest the
// cells) to InLUT4 (nearest the output), so the cell read is
// M[{InLUT4,InLUT3,InLUT2,InLUT1}]; M15 is reached with all four inputs high
// and M0 with all four low. Writing, the same tree acts as a 1-16 demux that
// carries the Pin input to the addressed cell. Read (R) and write (W) share
// the tree, so they must not be enabled together.
//
// Timing: out_lut follows the inputs combinationally while r is high and is 0
// while r is low (the output tri-state inverter is then off). A write with w
// high lands on the rising clock edge; the clocked write is this design's
// choice, the architecture uses a level-written static cell.
module lut4
  import fpga_pkg::*;
(
  input  logic               clk,
  input  logic               w,       // write enable
  input  logic               r,       // read enable
  input  logic               pin,     // write data
  input  logic [LUT_K-1:0]   in_lut,  // in_lut[0] = InLUT1 ... in_lut[3] = InLUT4
  output logic               out_lut, // OutLUT
  output logic [LUT_CELLS-1:0] cells  // stored bits, for observation
);

  logic [LUT_CELLS-1:0] sel;
  logic [LUT_CELLS-1:0] out_cell;

  // 1-16 demux of the write path: one-hot decode of the LUT inputs.
  always_comb begin
    sel = '0;
    sel[in_lut] = 1'b1;
  end

  for (genvar i = 0; i < LUT_CELLS; i++) begin : g_cell
    mem_cell u_cell (
      .clk     (clk),
      .w       (w),
      .sel     (sel[i]),
      .din     (pin),
      .r       (r),
      .q       (cells[i]),
      .out_cell(out_cell[i])
    );
  end

  // 16-1 mux of the read path, level by level as in the pass-gate tree.
  logic [7:0] lvl1;
  logic [3:0] lvl2;
  logic [1:0] lvl3;
  always_comb begin
    for (int i = 0; i < 8; i++) lvl1[i] = in_lut[0] ? out_cell[2*i+1] : out_cell[2*i];
    for (int i = 0; i < 4; i++) lvl2[i] = in_lut[1] ? lvl1[2*i+1]     : lvl1[2*i];
    for (int i = 0; i < 2; i++) lvl3[i] = in_lut[2] ? lvl2[2*i+1]     : lvl2[2*i];
    out_lut = r & (in_lut[3] ? lvl3[1] : lvl3[0]);
  end

  // The shared pass-gate tree cannot read and write at once.
  a_rw_exclusive: assert property (@(posedge clk) !(w && r))
    else $error("lut4: W and R enabled together");

endmodule
