// tb_addition_unit: drives one addition unit with its own sequencer (not the tile controller):
// random weight bits (rows x k bit-lines) and multiplier values, rows split over 1 to 4
// activation groups; the ADC codes are the per-group column counts. Checks the unit result
// against sum(x_r * w_r) for all four signedness combinations.
module tb_addition_unit;
  import cim_pkg::*;
  localparam int unsigned NCOL = 4, ADC_BITS = 5, CW = 5, OUT_W = 16, MAXR = 16;
  logic clk = 0, rst_n = 0;
  cim_ctl_t ctl;
  unit_cfg_t ucfg;
  logic [ADC_BITS-1:0] adc_code;
  logic [OUT_W-1:0] r4;
  int checks = 0, failures = 0, cyc = 0;
  int n_mode [4];

  addition_unit #(.NCOL(NCOL), .ADC_BITS(ADC_BITS), .CW(CW), .OUT_W(OUT_W)) dut (
    .clk, .rst_n, .ctl, .ucfg, .adc_code, .r4);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    ctl = '0; ucfg = '0; adc_code = '0;
    for (int i = 0; i < 4; i++) n_mode[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 150; t++) begin
      automatic int k = 1 + $urandom % NCOL, m = 1 + $urandom % 6;
      automatic bit sk = 1'($urandom), sm = 1'($urandom);
      automatic int nrows = 1 + $urandom % MAXR;
      automatic int l2 = $clog2(nrows);
      automatic int ng = 1 + $urandom % 4;
      automatic int so = k + m + l2;
      automatic logic [NCOL-1:0] w [MAXR];
      automatic logic [7:0] x [MAXR];
      automatic longint exp_v = 0, got;
      n_mode[{sk, sm}]++;
      for (int r = 0; r < nrows; r++) begin
        automatic longint wv = 0, xv = 0;
        w[r] = NCOL'($urandom); x[r] = 8'($urandom);
        for (int c = 0; c < k; c++) wv |= longint'(w[r][c]) << c;
        if (sk && w[r][k-1]) wv -= longint'(1) << k;
        for (int b = 0; b < m; b++) xv |= longint'(x[r][b]) << b;
        if (sm && x[r][m-1]) xv -= longint'(1) << m;
        exp_v += wv * xv;
      end
      ucfg.k_bits = 5'(k); ucfg.mpd_signed = sk; ucfg.e2 = 4'(l2);
      ucfg.m_bits = 5'(m); ucfg.mpr_signed = sm; ucfg.s_out = 6'(so);
      @(negedge clk); ctl = '0; ctl.s3_clear = 1;
      for (int s = 0; s < m; s++) begin
        @(negedge clk); ctl = '0; ctl.s2_clear = 1;
        for (int g = 0; g < ng; g++) begin
          for (int c = 0; c < NCOL; c++) begin
            automatic int cnt = 0;
            for (int r = 0; r < nrows; r++)
              if (r % ng == g) cnt += int'(x[r][s] & w[r][c]);
            @(negedge clk); ctl = '0;
            ctl.s1_en = 1; ctl.s1_first = (g == 0); ctl.col = 8'(c); adc_code = ADC_BITS'(cnt);
            if (g == ng - 1) begin
              @(negedge clk); ctl = '0;
              ctl.s2_step = 1; ctl.s2_idx = 6'(c);
            end
          end
        end
        for (int e = 0; e < l2; e++) begin
          @(negedge clk); ctl = '0; ctl.s2_step = 1; ctl.s2_idx = 6'(NCOL + e);
        end
        @(negedge clk); ctl = '0; ctl.s2_fin = 1;
        @(negedge clk); ctl = '0; ctl.s3_step = 1; ctl.s3_idx = 6'(s);
      end
      for (int i = m; i < so; i++) begin
        @(negedge clk); ctl = '0; ctl.s3_step = 1; ctl.s3_idx = 6'(i);
      end
      @(negedge clk); ctl = '0; ctl.s3_fin = 1;
      @(negedge clk); ctl = '0;
      got = (sk | sm) ? longint'($signed(r4)) : longint'(r4);
      checks++;
      if (got != exp_v) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d k=%0d m=%0d sk=%0d sm=%0d rows=%0d groups=%0d got %0d expected %0d",
                                   t, k, m, sk, sm, nrows, ng, got, exp_v);
      end
    end
    for (int i = 0; i < 4; i++) begin checks++; if (n_mode[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    wait (cyc == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
