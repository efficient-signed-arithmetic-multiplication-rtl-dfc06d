// tb_stage3_segment_slide: feeds random per-segment partial sums (signed or unsigned R2temp),
// adds the virtual input-segment rounds for a signed multiplier and checks R4temp against
// sum(2^s * partial_s), with the most significant segment weighted -2^(M-1) when signed.
module tb_stage3_segment_slide;
  localparam int unsigned R2W = 16, OUT_W = 40;
  logic clk = 0, rst_n = 0, clear = 0, step = 0, fin = 0, mpr_signed = 0, r2_signed = 0;
  logic [5:0] idx = '0, s_out = '0;
  logic [4:0] m_bits = '0;
  logic [R2W-1:0] r2 = '0;
  logic [OUT_W-1:0] r4;
  int checks = 0, failures = 0, cyc = 0;
  int n_mode [4];

  stage3_segment_slide #(.R2W(R2W), .OUT_W(OUT_W)) dut (
    .clk, .rst_n, .clear, .step, .idx, .fin, .m_bits, .mpr_signed, .r2_signed, .s_out, .r2, .r4);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    for (int i = 0; i < 4; i++) n_mode[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      automatic int m = 1 + $urandom % 16;
      automatic bit sm = 1'($urandom), sr = 1'($urandom);
      automatic int so = (sr ? 14 : 17) + m;
      automatic longint exp_v = 0, got, v;
      n_mode[{sm, sr}]++;
      @(negedge clk);
      m_bits = 5'(m); mpr_signed = sm; r2_signed = sr; s_out = 6'(so);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int s = 0; s < m; s++) begin
        if (sr) v = longint'($urandom % 8192) - 4096;
        else    v = longint'($urandom % 65536);
        r2 = R2W'(v);
        if (sm && s == m - 1) exp_v -= v <<< s;
        else                  exp_v += v <<< s;
        step = 1; idx = 6'(s);
        @(negedge clk);
      end
      // virtual input segments reuse R2temp; two surplus steps must be ignored
      for (int i = m; i < so + 2; i++) begin
        if (!sm || i >= so) r2 = R2W'($urandom);
        step = 1; idx = 6'(i);
        @(negedge clk);
      end
      step = 0; fin = 1;
      @(negedge clk);
      fin = 0;
      got = (sm | sr) ? longint'($signed(r4)) : longint'(r4);
      checks++;
      if (got != exp_v) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d m=%0d sm=%0d sr=%0d r4=%0d expected %0d", t, m, sm, sr, got, exp_v);
      end
    end
    for (int i = 0; i < 4; i++) begin checks++; if (n_mode[i] == 0) failures++; end
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
