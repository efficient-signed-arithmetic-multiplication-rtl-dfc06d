// stage3_segment_slide: third-stage periphery (sliding over input segments).
//
// The multiplier is fed to the rows one bit (one input segment) per analog step, least
// significant first; stage 2 leaves the partial sum of each segment in R2temp. This block adds
// R2temp to R3temp in an adder one bit wider than R2temp, writes the least significant bit of
// the sum into R4temp at the segment's position and keeps the rest in R3temp, so the weight of
// each segment is applied without a shifter and the adder stays R2W+1 bits wide.
//  * When R2temp holds a signed value (signed array data), both operands get a 1-bit sign
//    extension into the adder; R3temp is then a two's complement number.
//  * Signed input data: the sign extension of the multiplier (virtual input segments) would
//    give the same partial sum as its most significant bit, which is still in R2temp, so the
//    loop runs s_out - m_bits extra rounds without new analog steps. R4temp then holds s_out
//    bits of a two's complement result and is sign-extended.
//  * Unsigned input data: after the last segment R3temp is copied above the m_bits collected bits.
//
// Interface: clear (start of an operation), step with idx (steps at or above m_bits, or s_out
// when signed, are ignored), fin (form the result in r4). One step per cycle.
// OUT_W is this design's choice: wide enough for 16-bit by 16-bit products over 256 rows.
module stage3_segment_slide #(
  parameter int unsigned R2W   = 16,
  parameter int unsigned OUT_W = 40
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               step,
  input  logic [5:0]         idx,
  input  logic               fin,
  input  logic [4:0]         m_bits,
  input  logic               mpr_signed,
  input  logic               r2_signed,   // R2temp is two's complement
  input  logic [5:0]         s_out,
  input  logic [R2W-1:0]     r2,
  output logic [OUT_W-1:0]   r4
);
  logic [R2W-1:0]   r3;
  logic [R2W:0]     a, b, sum;
  logic [6:0]       nsteps;
  logic             act;
  logic [OUT_W-1:0] r3_ext, r4_fin;

  assign a      = {r2_signed & r2[R2W-1], r2};
  assign b      = {r2_signed & r3[R2W-1], r3};
  assign sum    = a + b;
  assign nsteps = mpr_signed ? {1'b0, s_out} : {2'b0, m_bits};
  assign act    = step && ({1'b0, idx} < nsteps);
  assign r3_ext = r2_signed ? OUT_W'($signed(r3)) : OUT_W'(r3);

  always_comb begin
    r4_fin = r4;
    if (!mpr_signed) begin
      r4_fin = r4 | (r3_ext << m_bits);
    end else begin
      for (int i = 0; i < OUT_W; i++)
        if (i >= int'(s_out)) r4_fin[i] = r4[s_out-6'd1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r3 <= '0;
      r4 <= '0;
    end else if (clear) begin
      r3 <= '0;
      r4 <= '0;
    end else if (act) begin
      r3      <= sum[R2W:1];
      r4[idx] <= sum[0];
    end else if (fin) begin
      r4 <= r4_fin;
    end
  end
endmodule
