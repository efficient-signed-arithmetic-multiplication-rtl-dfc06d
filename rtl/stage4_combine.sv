// stage4_combine: fourth-stage periphery (numbers split over several ADCs).
//
// When a multiplicand element is wider than the bit-lines of one ADC, its bits are spread over
// NU neighbouring ADCs, each with its own addition unit; the unit holding the most significant
// bits applies the virtual bit-lines, the others treat their part as unsigned. Their R4temp
// results differ in weight by P bits (the bit-lines per ADC). This block adds them one per
// step, lowest first, to Rfinal_temp: the P low bits of each sum go straight into Rfinal, the
// rest (shifted, sign-preserving when the result is signed) stay in Rfinal_temp; the last sum
// fills the top of Rfinal. The adder is IW+1 bits wide instead of the full result width.
//
// Interface: clear, step with idx = unit (0..NU-1, in order), one step per cycle; rfinal is
// valid the cycle after the step with idx = NU-1. Inputs are IW-bit results, sign-extended by
// the units when is_signed.
module stage4_combine #(
  parameter int unsigned NU = 2,    // addition units sharing one number
  parameter int unsigned P  = 8,    // positional difference between units (bits)
  parameter int unsigned IW = 40    // width of one unit's result
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       step,
  input  logic [3:0]                 idx,
  input  logic                       is_signed,
  input  logic [IW-1:0]              r4_in [NU],
  output logic [IW+(NU-1)*P-1:0]     rfinal
);
  localparam int unsigned FW = IW + (NU-1)*P;
  localparam int unsigned UW = (NU > 1) ? $clog2(NU) : 1;

  logic [IW-1:0] tmp;
  logic [IW:0]   a, b, sum;
  logic [IW:0]   shr;
  logic [UW-1:0] u;

  assign u   = idx[UW-1:0];
  assign a   = {is_signed & r4_in[u][IW-1], r4_in[u]};
  assign b   = {is_signed & tmp[IW-1], tmp};
  assign sum = a + b;
  assign shr = is_signed ? (IW+1)'($signed(sum) >>> P) : (sum >> P);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmp    <= '0;
      rfinal <= '0;
    end else if (clear) begin
      tmp    <= '0;
      rfinal <= '0;
    end else if (step) begin
      if (int'(idx) < NU - 1) begin
        rfinal[idx*P +: P] <= sum[P-1:0];
        tmp                <= shr[IW-1:0];
      end else begin
        rfinal[FW-1 -: IW] <= sum[IW-1:0];
      end
    end
  end
endmodule
