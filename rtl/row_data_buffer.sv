// row_data_buffer: row data buffer feeding the crossbar's row drivers.
//
// One entry per crossbar row, as wide as the largest supported data type, holds the multiplier
// element that row is multiplied with. It is filled from outside the tile one row per clock
// cycle (wr_en, wr_row, wr_data). During an operation the controller selects one bit position
// (seg, one input segment for 1-bit drivers) and the buffer presents that bit of every row to
// the drivers (row_bits, combinational). The array is not reset; unwritten rows are undefined.
module row_data_buffer #(
  parameter int unsigned ROWS = 256,
  parameter int unsigned DW   = 16,
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned SW  = (DW > 1) ? $clog2(DW) : 1
) (
  input  logic            clk,
  input  logic            wr_en,
  input  logic [RW-1:0]   wr_row,
  input  logic [DW-1:0]   wr_data,
  input  logic [SW-1:0]   seg,
  output logic [ROWS-1:0] row_bits
);
  logic [DW-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) row_bits[r] = mem[r][seg];
  end
endmodule
