// adc: behavioural model of one ADC shared by NCOL bit-lines.
//
// Stands for the analog-to-digital converter: an analog multiplexer selects the held level of
// bit-line col and the converter returns it as a BITS-bit code, saturating at full scale
// (2^BITS - 1) when the level is out of range. One conversion per clock cycle (the document's
// converter runs at 1.2 GS/s against a 1 GHz clock); the code is combinational here and is
// registered by the addition unit's ADC register.
module adc #(
  parameter int unsigned NCOL = 8,
  parameter int unsigned BITS = 8,
  parameter int unsigned LW   = 9,
  localparam int unsigned CIW = (NCOL > 1) ? $clog2(NCOL) : 1
) (
  input  logic [CIW-1:0]  col,
  input  logic [LW-1:0]   held [NCOL],
  output logic [BITS-1:0] code
);
  localparam logic [LW:0] FULL = (LW+1)'((64'd1 << BITS) - 64'd1);
  logic [LW-1:0] lvl;

  assign lvl  = held[col];
  assign code = ({1'b0, lvl} > FULL) ? BITS'(FULL) : BITS'(lvl);
endmodule
