// tb_sample_hold: checks that the sample-and-hold captures all bit-line levels on the strobe and
// keeps them while the levels change without a strobe.
module tb_sample_hold;
  localparam int unsigned COLS = 16, LW = 5;
  logic clk = 0, rst_n = 0, sample = 0;
  logic [LW-1:0] bl_level [COLS];
  logic [LW-1:0] held [COLS];
  logic [LW-1:0] ref_q [COLS];
  int checks = 0, failures = 0, cyc = 0;

  sample_hold #(.COLS(COLS), .LW(LW)) dut (.clk, .rst_n, .sample, .bl_level, .held);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    for (int c = 0; c < COLS; c++) begin bl_level[c] = '0; ref_q[c] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      for (int c = 0; c < COLS; c++) bl_level[c] = LW'($urandom);
      sample = (t % 3 == 0);
      if (sample) ref_q = bl_level;
      @(negedge clk);
      sample = 0;
      for (int c = 0; c < COLS; c++) bl_level[c] = LW'($urandom);
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (held[c] != ref_q[c]) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d col %0d held %0d expected %0d", t, c, held[c], ref_q[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    wait (cyc == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
