// tb_row_data_buffer: fills every row (one per cycle), then checks that each bit position
// presents the right bit of every row; overwrites some rows and checks again.
module tb_row_data_buffer;
  localparam int unsigned ROWS = 32, DW = 16;
  logic clk = 0, wr_en = 0;
  logic [4:0] wr_row = '0;
  logic [DW-1:0] wr_data = '0;
  logic [3:0] seg = '0;
  logic [ROWS-1:0] row_bits;
  logic [DW-1:0] img [ROWS];
  int checks = 0, failures = 0, cyc = 0;

  row_data_buffer #(.ROWS(ROWS), .DW(DW)) dut (.clk, .wr_en, .wr_row, .wr_data, .seg, .row_bits);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check_all();
    for (int s = 0; s < DW; s++) begin
      seg = 4'(s);
      #1;
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (row_bits[r] != img[r][s]) begin
          failures++;
          if (failures < 5) $display("FAIL row %0d seg %0d", r, s);
        end
      end
    end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      img[r] = DW'($urandom);
      wr_en = 1; wr_row = 5'(r); wr_data = img[r];
    end
    @(negedge clk); wr_en = 0;
    check_all();
    for (int t = 0; t < 10; t++) begin
      automatic int r = $urandom % ROWS;
      @(negedge clk);
      img[r] = DW'($urandom);
      wr_en = 1; wr_row = 5'(r); wr_data = img[r];
    end
    @(negedge clk); wr_en = 0;
    check_all();
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
