// crossbar_array: behavioural model of the 1T1R memristor crossbar with its 1-bit row drivers.
//
// Not synthesizable hardware in the real tile: it stands for the analog array. Each cell holds
// one bit (two resistance levels, LRS = 1). A row contributes to the bit-lines when its word-line
// is enabled (row_act) and its 1-bit driver applies the read voltage (row_in = 1); each bit-line
// then carries a current proportional to the number of such rows whose cell is 1. The model
// reports that count (bl_level), i.e. the analog addition the crossbar performs for free.
// Programming writes one full row of cells per cycle (prog_en); write time and device
// non-idealities are not modelled. Cells have no reset (non-volatile); they are undefined until
// programmed. Bit-line levels follow row_in, row_act and the cells combinationally; the tile
// controller waits the read time before sampling them.
module crossbar_array #(
  parameter int unsigned ROWS = 256,
  parameter int unsigned COLS = 256,
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned LW  = $clog2(ROWS + 1)
) (
  input  logic            clk,
  input  logic            prog_en,
  input  logic [RW-1:0]   prog_row,
  input  logic [COLS-1:0] prog_data,
  input  logic [ROWS-1:0] row_in,
  input  logic [ROWS-1:0] row_act,
  output logic [LW-1:0]   bl_level [COLS]
);
  // cells kept per bit-line: bl_cells[c][r] is the cell of row r on bit-line c
  logic [ROWS-1:0] bl_cells [COLS];
  logic [ROWS-1:0] drive;

  assign drive = row_in & row_act;

  always_ff @(posedge clk) begin
    if (prog_en)
      for (int c = 0; c < COLS; c++) bl_cells[c][prog_row] <= prog_data[c];
  end

  always_comb begin
    for (int c = 0; c < COLS; c++) bl_level[c] = LW'($countones(drive & bl_cells[c]));
  end
endmodule
