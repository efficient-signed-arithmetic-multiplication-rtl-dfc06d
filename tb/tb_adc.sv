// tb_adc: checks the shared ADC model: every bit-line is selectable and levels above full scale
// saturate at 2^BITS - 1. Levels are random, with full-scale and overflow cases forced.
module tb_adc;
  localparam int unsigned NCOL = 8, BITS = 4, LW = 6;
  logic [2:0] col;
  logic [LW-1:0] held [NCOL];
  logic [BITS-1:0] code;
  int checks = 0, failures = 0, n_sat = 0;

  adc #(.NCOL(NCOL), .BITS(BITS), .LW(LW)) dut (.col, .held, .code);

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NCOL; i++) held[i] = LW'($urandom);
      if (t == 0) held[3] = LW'(15);
      if (t == 1) held[5] = LW'(16);
      for (int c = 0; c < NCOL; c++) begin
        automatic int exp_v;
        col = 3'(c);
        #1;
        exp_v = (int'(held[c]) > 15) ? 15 : int'(held[c]);
        if (int'(held[c]) > 15) n_sat++;
        checks++;
        if (int'(code) != exp_v) begin
          failures++;
          $display("FAIL col %0d level %0d code %0d expected %0d", c, held[c], code, exp_v);
        end
      end
    end
    checks++; if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
