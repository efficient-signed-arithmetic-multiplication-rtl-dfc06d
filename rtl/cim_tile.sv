// cim_tile: computation-in-memory tile for signed and unsigned matrix multiplication on a
// 1T1R memristor crossbar, without programming sign-extension bits into the array.
//
// Each multiplicand element (array data) is stored one bit per cell in COLS_PER_ADC neighbouring
// bit-lines; a column of the multiplicand matrix occupies one ADC's bit-lines in every row.
// The multiplier elements (input data) sit in the row data buffer, one per row, and are applied
// one bit per analog step through 1-bit row drivers. Each bit-line sums the products of its
// rows (analog addition); sample-and-hold circuits keep the sums while each ADC, shared by
// COLS_PER_ADC bit-lines, converts them one per cycle. One addition unit per ADC combines the
// conversions with small adders (stages 1 to 3); for signed data the sign-extension bits are
// never stored or applied: extra rounds in stage 2 (virtual bit-lines) and stage 3 (virtual
// input segments) reuse values already in the registers. A multiplicand wider than one ADC's
// bit-lines (up to MAX_DW = 2 * COLS_PER_ADC) is split over an even/odd pair of ADCs whose
// results stage 4 adds.
//
// Use: program the crossbar (prog_*, one row per cycle), fill the row data buffer (buf_wr_*, one
// row per cycle; rows not summed must hold 0), then pulse start with cfg. done pulses when the
// results are valid; they stay until the next start.
//  unit_result[u]  : sum over rows of input * element in ADC u's bit-lines (not split)
//  pair_result[p]  : sum over rows of input * element spread over ADCs 2p (low) and 2p+1 (high)
// Results are exact while no bit-line sum exceeds the ADC range (2^ADC_BITS - 1).
// Defaults follow the document (256 x 256 array, 8-bit ADC per 8 bit-lines, 10-cycle read at
// 1 GHz); MAX_DW and the result widths are this design's choice.
module cim_tile
  import cim_pkg::*;
#(
  parameter int unsigned ROWS         = 256,
  parameter int unsigned COLS         = 256,
  parameter int unsigned COLS_PER_ADC = 8,
  parameter int unsigned ADC_BITS     = 8,
  parameter int unsigned MAX_DW       = 16,
  parameter int unsigned READ_CYC     = 10,
  localparam int unsigned NADC  = COLS / COLS_PER_ADC,
  localparam int unsigned NPAIR = NADC / 2,
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned LW    = $clog2(ROWS + 1),
  localparam int unsigned CW    = ADC_BITS,
  localparam int unsigned OUT_W = 2 * MAX_DW + $clog2(ROWS),
  localparam int unsigned FW    = OUT_W + COLS_PER_ADC
) (
  input  logic              clk,
  input  logic              rst_n,
  // crossbar programming
  input  logic              prog_en,
  input  logic [RW-1:0]     prog_row,
  input  logic [COLS-1:0]   prog_data,
  // row data buffer fill
  input  logic              buf_wr_en,
  input  logic [RW-1:0]     buf_wr_row,
  input  logic [MAX_DW-1:0] buf_wr_data,
  // operation
  input  logic              start,
  input  cim_cfg_t          cfg,
  output logic              busy,
  output logic              done,
  output logic [31:0]       cycles,
  output logic [OUT_W-1:0]  unit_result [NADC],
  output logic [FW-1:0]     pair_result [NPAIR]
);
  localparam int unsigned CIW = (COLS_PER_ADC > 1) ? $clog2(COLS_PER_ADC) : 1;
  localparam int unsigned SW  = (MAX_DW > 1) ? $clog2(MAX_DW) : 1;

  cim_ctl_t   ctl;
  cim_cfg_t   cfg_q;
  logic       split;
  logic [5:0] s_out;

  logic [ROWS-1:0] row_bits, row_act;
  logic [LW-1:0]   bl_level [COLS];
  logic [LW-1:0]   held     [COLS];
  logic [31:0]     cyc_cnt;

  tile_controller #(.ROWS(ROWS), .COLS_PER_ADC(COLS_PER_ADC), .READ_CYC(READ_CYC), .NU(2)) u_ctrl (
    .clk, .rst_n, .start, .cfg, .ctl, .cfg_q, .split, .s_out, .busy, .done);

  row_data_buffer #(.ROWS(ROWS), .DW(MAX_DW)) u_rdb (
    .clk, .wr_en(buf_wr_en), .wr_row(buf_wr_row), .wr_data(buf_wr_data),
    .seg(SW'(ctl.seg)), .row_bits);

  // word-lines of the row group being activated
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      row_act[r] = ((r >> cfg_q.act_log2) == int'(ctl.grp));
  end

  crossbar_array #(.ROWS(ROWS), .COLS(COLS)) u_xbar (
    .clk, .prog_en, .prog_row, .prog_data, .row_in(row_bits), .row_act, .bl_level);

  sample_hold #(.COLS(COLS), .LW(LW)) u_sh (
    .clk, .rst_n, .sample(ctl.sample), .bl_level, .held);

  for (genvar u = 0; u < NADC; u++) begin : g_unit
    logic [LW-1:0]       held_u [COLS_PER_ADC];
    logic [ADC_BITS-1:0] code;
    unit_cfg_t           ucfg;

    always_comb begin
      for (int i = 0; i < COLS_PER_ADC; i++) held_u[i] = held[u*COLS_PER_ADC + i];
      ucfg.m_bits     = cfg_q.mpr_bits;
      ucfg.mpr_signed = cfg_q.mpr_signed;
      ucfg.s_out      = s_out;
      ucfg.e2         = cfg_q.log2_rows;
      if (!split) begin
        ucfg.k_bits     = cfg_q.mpd_bits;
        ucfg.mpd_signed = cfg_q.mpd_signed;
      end else if (u % 2 == 0) begin
        ucfg.k_bits     = 5'(COLS_PER_ADC);      // low part: plain unsigned bits
        ucfg.mpd_signed = 1'b0;
      end else begin
        ucfg.k_bits     = cfg_q.mpd_bits - 5'(COLS_PER_ADC);
        ucfg.mpd_signed = cfg_q.mpd_signed;      // high part carries the sign
      end
    end

    adc #(.NCOL(COLS_PER_ADC), .BITS(ADC_BITS), .LW(LW)) u_adc (
      .col(ctl.col[CIW-1:0]), .held(held_u), .code);

    addition_unit #(.NCOL(COLS_PER_ADC), .ADC_BITS(ADC_BITS), .CW(CW), .OUT_W(OUT_W)) u_au (
      .clk, .rst_n, .ctl, .ucfg, .adc_code(code), .r4(unit_result[u]));
  end

  for (genvar p = 0; p < NPAIR; p++) begin : g_pair
    logic [OUT_W-1:0] pair_in [2];
    assign pair_in[0] = unit_result[2*p];
    assign pair_in[1] = unit_result[2*p+1];

    stage4_combine #(.NU(2), .P(COLS_PER_ADC), .IW(OUT_W)) u_s4 (
      .clk, .rst_n, .clear(ctl.s4_clear), .step(ctl.s4_step), .idx(ctl.s4_idx),
      .is_signed(cfg_q.mpd_signed | cfg_q.mpr_signed), .r4_in(pair_in), .rfinal(pair_result[p]));
  end

  // busy cycles of the last operation (from the cycle after start to the done cycle)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_cnt <= '0;
      cycles  <= '0;
    end else if (!busy && start) begin
      cyc_cnt <= 32'd1;
    end else if (busy) begin
      cyc_cnt <= cyc_cnt + 32'd1;
      if (done) cycles <= cyc_cnt;
    end
  end

  initial begin
    assert (MAX_DW <= 2 * COLS_PER_ADC) else $error("MAX_DW must fit two ADCs");
    assert (COLS % (2 * COLS_PER_ADC) == 0) else $error("ADCs must pair up");
  end
endmodule
