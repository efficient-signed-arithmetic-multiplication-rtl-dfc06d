// sample_hold: behavioural model of the per-bit-line sample-and-hold circuits.
//
// Stands for the analog S&H stage between the crossbar and the shared ADCs: on the sample
// strobe every bit-line level is captured, and it is held while the ADCs convert the bit-lines
// one after another. Levels are carried as counts. Held values are cleared by reset.
module sample_hold #(
  parameter int unsigned COLS = 256,
  parameter int unsigned LW   = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample,
  input  logic [LW-1:0] bl_level [COLS],
  output logic [LW-1:0] held     [COLS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < COLS; c++) held[c] <= '0;
    end else if (sample) begin
      held <= bl_level;
    end
  end
endmodule
