// stage1_row_accum: first-stage periphery of one addition unit (multi-step row activation).
//
// When the ADC resolution (or the technology) does not allow all rows to be activated at once,
// the rows are activated in groups and the ADC scans the bit-lines once per group. This block
// keeps one register per bit-line of its ADC; a multiplexer picks the register of the bit-line
// being converted, an adder adds the new conversion and a demultiplexer writes the sum back.
// The first group loads instead of adding. Every sum is also written to the ADC register that
// feeds stage 2, but only for bit-lines that hold part of the number (col < k_bits), so that for
// the remaining columns of a scan the ADC register keeps the most significant column's value.
// With a single group the block reduces to the ADC register.
//
// Timing: one conversion per cycle (en); the sum is in adc_reg the next cycle.
// Register width CW = log2(rows) + log2(levels) follows the document; one bit per cell.
// Reset clears all registers (the document does not describe reset).
module stage1_row_accum #(
  parameter int unsigned NCOL     = 8,   // bit-lines sharing the ADC
  parameter int unsigned ADC_BITS = 8,
  parameter int unsigned CW       = 8    // column-sum register width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,        // a conversion of bit-line col is present
  input  logic                    first,     // first row group
  input  logic [7:0]              col,
  input  logic [4:0]              k_bits,    // bit-lines of this unit holding the number
  input  logic [ADC_BITS-1:0]     adc_code,
  output logic [CW-1:0]           adc_reg
);
  localparam int unsigned CIW = (NCOL > 1) ? $clog2(NCOL) : 1;

  logic [CW-1:0] acc [NCOL];
  logic [CW-1:0] sum;
  logic [CIW-1:0] ci;

  assign ci  = col[CIW-1:0];
  assign sum = (first ? '0 : acc[ci]) + CW'(adc_code);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCOL; i++) acc[i] <= '0;
      adc_reg <= '0;
    end else if (en) begin
      acc[ci] <= sum;
      if (col < {3'b0, k_bits}) adc_reg <= sum;
    end
  end
endmodule
