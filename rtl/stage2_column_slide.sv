// stage2_column_slide: second-stage periphery (sliding over the columns of one number).
//
// The bits of a multiplicand element sit in neighbouring bit-lines, least significant first.
// Instead of shifting each column sum by its weight and adding it in a wide adder, every step
// adds the ADC register to R1temp in an adder one bit wider than the ADC register, writes the
// least significant bit of the sum straight into R2temp at the step's bit position and keeps
// the remaining bits in R1temp: the shift is implicit and the adder stays CW+1 bits wide.
//  * unsigned: after the last column R1temp is copied above the collected bits of R2temp.
//  * signed (two's complement array data): sign extension of the stored numbers is not
//    programmed into the crossbar. Their effect, the virtual bit-lines, equals repeating the most
//    significant column, whose sum is still in the ADC register, so the loop simply runs e2 more
//    rounds (e2 = log2(rows summed)). The k_bits+e2 collected bits are then a two's complement
//    number that is sign-extended over R2temp; what is left in R1temp only repeats the sign.
//
// Interface: clear (start of an input segment), step with idx (bit position; steps at or above
// k_bits+e2, or k_bits when unsigned, are ignored), fin (form R2temp). One step per cycle.
// R2temp width KMAX + CW follows the document's register size (datatype + log2 rows).
module stage2_column_slide #(
  parameter int unsigned CW   = 8,   // ADC register / R1temp width
  parameter int unsigned KMAX = 8    // columns per ADC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 step,
  input  logic [5:0]           idx,
  input  logic                 fin,
  input  logic [4:0]           k_bits,
  input  logic                 mpd_signed,
  input  logic [3:0]           e2,
  input  logic [CW-1:0]        adc_reg,
  output logic [KMAX+CW-1:0]   r2
);
  localparam int unsigned R2W = KMAX + CW;

  logic [CW-1:0]  r1;
  logic [CW:0]    sum;
  logic [6:0]     nbits;     // bits collected in R2temp
  logic           act;
  logic [R2W-1:0] r2_fin;

  assign nbits = {2'b0, k_bits} + (mpd_signed ? {3'b0, e2} : 7'd0);
  assign act   = step && ({1'b0, idx} < nbits);
  assign sum   = {1'b0, adc_reg} + {1'b0, r1};

  always_comb begin
    r2_fin = r2;
    if (!mpd_signed) begin
      r2_fin = r2 | (R2W'(r1) << k_bits);
    end else begin
      for (int i = 0; i < R2W; i++)
        if (i >= int'(nbits)) r2_fin[i] = r2[nbits-7'd1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0;
      r2 <= '0;
    end else if (clear) begin
      r1 <= '0;
      r2 <= '0;
    end else if (act) begin
      r1      <= sum[CW:1];
      r2[idx] <= sum[0];
    end else if (fin) begin
      r2 <= r2_fin;
    end
  end
endmodule
