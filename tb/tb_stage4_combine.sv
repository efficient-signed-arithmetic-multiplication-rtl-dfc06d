// tb_stage4_combine: two instances, the tile's pair (2 units, 8 bits apart, 40-bit inputs) and
// a three-unit, 3-bit case like the document's example; random signed and unsigned unit
// results are combined and Rfinal is checked against sum(in_u * 2^(u*P)).
module tb_stage4_combine;
  logic clk = 0, rst_n = 0, clear = 0, step = 0, is_signed = 0;
  logic [3:0] idx = '0;
  logic [39:0] in2 [2];
  logic [11:0] in3 [3];
  logic [47:0] rf2;
  logic [17:0] rf3;
  int checks = 0, failures = 0, cyc = 0;

  stage4_combine #(.NU(2), .P(8), .IW(40)) dut2 (.clk, .rst_n, .clear, .step, .idx, .is_signed,
                                                .r4_in(in2), .rfinal(rf2));
  stage4_combine #(.NU(3), .P(3), .IW(12)) dut3 (.clk, .rst_n, .clear, .step, .idx, .is_signed,
                                                .r4_in(in3), .rfinal(rf3));
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic longint e2 = 0, e3 = 0, g2, g3, v;
      is_signed = 1'($urandom);
      for (int u = 0; u < 2; u++) begin
        v = is_signed ? (longint'($urandom) - (longint'(1) << 31)) : longint'($urandom);
        in2[u] = 40'(v);
        e2 += v <<< (8 * u);
      end
      for (int u = 0; u < 3; u++) begin
        v = is_signed ? (longint'($urandom % 2048) - 1024) : longint'($urandom % 2048);
        in3[u] = 12'(v);
        e3 += v <<< (3 * u);
      end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int u = 0; u < 3; u++) begin
        step = 1; idx = 4'(u);
        // the two-unit instance only sees steps 0 and 1
        if (u == 2) begin step = 0; end
        @(negedge clk);
        if (u == 1) begin
          g2 = is_signed ? longint'($signed(rf2)) : longint'(rf2);
          checks++;
          if (g2 != e2) begin failures++; if (failures < 5) $display("FAIL pair got %0d expected %0d", g2, e2); end
        end
      end
      step = 1; idx = 4'd2;
      @(negedge clk);
      step = 0;
      g3 = is_signed ? longint'($signed(rf3)) : longint'(rf3);
      checks++;
      if (g3 != e3) begin failures++; if (failures < 5) $display("FAIL triple got %0d expected %0d", g3, e3); end
    end
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
