// tb_stage2_column_slide: builds random bit matrices (rows x k bit-lines), feeds the column
// sums least significant bit-line first, adds the virtual bit-line rounds in signed mode (plus
// ignored surplus steps) and checks R2temp against the sum of the rows' values computed
// directly (two's complement rows in signed mode).
module tb_stage2_column_slide;
  localparam int unsigned CW = 8, KMAX = 8, R2W = KMAX + CW;
  logic clk = 0, rst_n = 0, clear = 0, step = 0, fin = 0, mpd_signed = 0;
  logic [5:0] idx = '0;
  logic [4:0] k_bits = '0;
  logic [3:0] e2 = '0;
  logic [CW-1:0] adc_reg = '0;
  logic [R2W-1:0] r2;
  int checks = 0, failures = 0, cyc = 0, n_signed = 0, n_unsigned = 0;

  stage2_column_slide #(.CW(CW), .KMAX(KMAX)) dut (
    .clk, .rst_n, .clear, .step, .idx, .fin, .k_bits, .mpd_signed, .e2, .adc_reg, .r2);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      automatic int k = 1 + $urandom % KMAX;
      automatic bit sg = 1'($urandom);
      automatic int l2 = $urandom % (CW + 1);
      automatic int nrows = sg ? (1 + $urandom % (1 << l2)) : (1 + $urandom % 255);
      automatic int colsum [KMAX];
      automatic longint exp_v = 0, got;
      if (sg) n_signed++; else n_unsigned++;
      for (int c = 0; c < KMAX; c++) colsum[c] = 0;
      for (int r = 0; r < nrows; r++) begin
        automatic logic [KMAX-1:0] w = KMAX'($urandom);
        automatic longint v = 0;
        for (int c = 0; c < k; c++) begin
          colsum[c] += int'(w[c]);
          v |= longint'(w[c]) << c;
        end
        if (sg && w[k-1]) v -= longint'(1) << k;
        exp_v += v;
      end
      @(negedge clk);
      k_bits = 5'(k); mpd_signed = sg; e2 = 4'(l2);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int c = 0; c < k; c++) begin
        adc_reg = CW'(colsum[c]); step = 1; idx = 6'(c);
        @(negedge clk);
      end
      // virtual bit-lines: the ADC register keeps the last column; then two surplus steps
      for (int e = 0; e < l2 + 2; e++) begin
        step = 1; idx = 6'(k + e);
        if (e >= l2 || !sg) adc_reg = CW'($urandom);
        @(negedge clk);
      end
      step = 0; fin = 1;
      @(negedge clk);
      fin = 0;
      got = sg ? longint'($signed(r2)) : longint'(r2);
      checks++;
      if (got != exp_v) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d k=%0d signed=%0d e2=%0d rows=%0d r2=%0d expected %0d",
                                   t, k, sg, l2, nrows, got, exp_v);
      end
    end
    checks++; if (n_signed == 0 || n_unsigned == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    wait (cyc == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
