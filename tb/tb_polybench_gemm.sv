// tb_polybench_gemm: a slice of a signed 8-bit matrix-matrix product C = A x B of the kind of
// the Polybench gemm and 3m kernels (both operands two's complement), on the tile at its
// default size. B (NK x NJ) is programmed into the crossbar one tile load at a time (at most
// 256 rows by 32 columns); for every load each row of A is written to the row data buffer and
// one operation is run. Partial sums over row blocks are added here, outside the tile. The
// slice is 6 x 300 times 300 x 40 (the kernels' full sizes would take hours to simulate);
// it still needs two row blocks (one of them partly filled) and two column blocks.
module tb_polybench_gemm;
  import cim_pkg::*;

  localparam int unsigned ROWS = 256, COLS = 256, CPA = 8, NADC = COLS / CPA;
  localparam int unsigned NI = 6, NK = 300, NJ = 40;

  logic clk = 0, rst_n = 0;
  logic prog_en = 0, buf_wr_en = 0, start = 0;
  logic [7:0] prog_row = '0, buf_wr_row = '0;
  logic [COLS-1:0] prog_data = '0;
  logic [15:0] buf_wr_data = '0;
  cim_cfg_t cfg;
  logic busy, done;
  logic [31:0] cycles;
  logic [39:0] unit_result [NADC];
  logic [47:0] pair_result [NADC/2];

  cim_tile dut (.clk, .rst_n, .prog_en, .prog_row, .prog_data, .buf_wr_en, .buf_wr_row,
                .buf_wr_data, .start, .cfg, .busy, .done, .cycles, .unit_result, .pair_result);

  always #1 clk = ~clk;

  int checks = 0, failures = 0, ops = 0;
  int a [NI][NK];
  int b [NK][NJ];
  longint c [NI][NJ];

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    for (int i = 0; i < NI; i++) for (int k = 0; k < NK; k++) a[i][k] = int'($urandom % 256) - 128;
    for (int k = 0; k < NK; k++) for (int j = 0; j < NJ; j++) b[k][j] = int'($urandom % 256) - 128;
    // extreme values on one row and column; one row in each block of 256 is left at +127 so that
    // no bit-line count reaches 256, beyond the 8-bit ADC's range
    for (int k = 0; k < NK; k++) begin a[0][k] = -128; b[k][0] = (k % 256 == 255) ? 127 : -128; end
    for (int i = 0; i < NI; i++) for (int j = 0; j < NJ; j++) c[i][j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j0 = 0; j0 < NJ; j0 += NADC) begin
      for (int k0 = 0; k0 < NK; k0 += ROWS) begin
        automatic int nr = (NK - k0 > ROWS) ? ROWS : NK - k0;
        automatic int nc = (NJ - j0 > NADC) ? NADC : NJ - j0;
        for (int r = 0; r < ROWS; r++) begin
          automatic logic [COLS-1:0] row = '0;
          if (r < nr) for (int u = 0; u < nc; u++) row[u*CPA +: CPA] = 8'(b[k0+r][j0+u]);
          @(negedge clk);
          prog_en = 1; prog_row = 8'(r); prog_data = row;
        end
        @(negedge clk); prog_en = 0;
        for (int i = 0; i < NI; i++) begin
          for (int r = 0; r < ROWS; r++) begin
            @(negedge clk);
            buf_wr_en = 1; buf_wr_row = 8'(r);
            buf_wr_data = (r < nr) ? 16'(a[i][k0+r]) : 16'd0;
          end
          @(negedge clk); buf_wr_en = 0;
          cfg.mpd_bits = 5'd8; cfg.mpr_bits = 5'd8; cfg.mpd_signed = 1; cfg.mpr_signed = 1;
          cfg.log2_rows = 4'($clog2(nr)); cfg.act_log2 = 4'($clog2(ROWS));
          @(negedge clk); start = 1;
          @(negedge clk); start = 0;
          wait (done);
          @(posedge clk);
          @(negedge clk);
          ops++;
          checks++;
          if (int'(cycles) != 1 + 8 * (11 + 9 + $clog2(nr) + 2) + 8 + $clog2(nr) + 1) begin
            failures++; $display("FAIL cycles %0d", cycles);
          end
          for (int u = 0; u < nc; u++) c[i][j0+u] += longint'($signed(unit_result[u]));
        end
      end
    end
    for (int i = 0; i < NI; i++)
      for (int j = 0; j < NJ; j++) begin
        automatic longint e = 0;
        for (int k = 0; k < NK; k++) e += longint'(a[i][k]) * longint'(b[k][j]);
        checks++;
        if (c[i][j] != e) begin
          failures++;
          if (failures < 8) $display("FAIL C[%0d][%0d] got %0d expected %0d", i, j, c[i][j], e);
        end
      end
    $display("operations=%0d", ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
