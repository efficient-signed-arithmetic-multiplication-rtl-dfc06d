// addition_unit: digital periphery of one ADC (stages 1 to 3 in series).
//
// Stage 1 accumulates bit-line sums over row-activation steps and holds the ADC register,
// stage 2 slides over the bit-lines of one multiplicand element (with virtual bit-lines when
// this unit holds a signed element's sign bit), stage 3 slides over the input segments (with
// virtual input segments for a signed multiplier). All three follow one control word from the
// tile controller; ucfg says what this unit holds. r4 is the unit's result, OUT_W bits,
// sign-extended when signed, valid after the stage-3 fin step.
module addition_unit
  import cim_pkg::*;
#(
  parameter int unsigned NCOL     = 8,
  parameter int unsigned ADC_BITS = 8,
  parameter int unsigned CW       = 8,
  parameter int unsigned OUT_W    = 40
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cim_ctl_t             ctl,
  input  unit_cfg_t            ucfg,
  input  logic [ADC_BITS-1:0]  adc_code,
  output logic [OUT_W-1:0]     r4
);
  localparam int unsigned R2W = NCOL + CW;

  logic [CW-1:0]  adc_reg;
  logic [R2W-1:0] r2;

  stage1_row_accum #(.NCOL(NCOL), .ADC_BITS(ADC_BITS), .CW(CW)) u_s1 (
    .clk, .rst_n, .en(ctl.s1_en), .first(ctl.s1_first), .col(ctl.col),
    .k_bits(ucfg.k_bits), .adc_code, .adc_reg);

  stage2_column_slide #(.CW(CW), .KMAX(NCOL)) u_s2 (
    .clk, .rst_n, .clear(ctl.s2_clear), .step(ctl.s2_step), .idx(ctl.s2_idx), .fin(ctl.s2_fin),
    .k_bits(ucfg.k_bits), .mpd_signed(ucfg.mpd_signed), .e2(ucfg.e2), .adc_reg, .r2);

  stage3_segment_slide #(.R2W(R2W), .OUT_W(OUT_W)) u_s3 (
    .clk, .rst_n, .clear(ctl.s3_clear), .step(ctl.s3_step), .idx(ctl.s3_idx), .fin(ctl.s3_fin),
    .m_bits(ucfg.m_bits), .mpr_signed(ucfg.mpr_signed), .r2_signed(ucfg.mpd_signed),
    .s_out(ucfg.s_out), .r2, .r4);
endmodule
