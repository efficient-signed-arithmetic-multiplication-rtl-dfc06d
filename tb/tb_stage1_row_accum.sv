// tb_stage1_row_accum: feeds random conversions for 1 to 4 row groups and checks that after the
// last group the ADC register holds, for each bit-line of the number, the sum over all groups,
// and that bit-lines beyond k_bits leave the ADC register unchanged.
module tb_stage1_row_accum;
  localparam int unsigned NCOL = 4, ADC_BITS = 6, CW = 8;
  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic [7:0] col = '0;
  logic [4:0] k_bits = '0;
  logic [ADC_BITS-1:0] adc_code = '0;
  logic [CW-1:0] adc_reg;
  int checks = 0, failures = 0, cyc = 0, n_multi = 0;

  stage1_row_accum #(.NCOL(NCOL), .ADC_BITS(ADC_BITS), .CW(CW)) dut (
    .clk, .rst_n, .en, .first, .col, .k_bits, .adc_code, .adc_reg);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic int g_n = 1 + $urandom % 4;
      automatic int k = 1 + $urandom % NCOL;
      automatic int tot [NCOL];
      automatic int last_loaded;
      if (g_n > 1) n_multi++;
      k_bits = 5'(k);
      for (int c = 0; c < NCOL; c++) tot[c] = 0;
      for (int g = 0; g < g_n; g++) begin
        for (int c = 0; c < NCOL; c++) begin
          automatic int v = $urandom % (1 << ADC_BITS);
          @(negedge clk);
          en = 1; first = (g == 0); col = 8'(c); adc_code = ADC_BITS'(v);
          tot[c] += v;
          if (g == g_n - 1) begin
            if (c < k) last_loaded = tot[c];
            @(negedge clk);
            en = 0;
            checks++;
            if (int'(adc_reg) != last_loaded) begin
              failures++;
              if (failures < 5) $display("FAIL t=%0d col %0d adc_reg %0d expected %0d", t, c, adc_reg, last_loaded);
            end
          end
        end
      end
      @(negedge clk); en = 0;
    end
    checks++; if (n_multi == 0) failures++;
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
