// tb_crossbar_array: programs random cells row by row, then applies random row inputs and
// word-line enables and checks each bit-line level against the count of rows whose input,
// enable and cell are all 1.
module tb_crossbar_array;
  localparam int unsigned ROWS = 16, COLS = 12, LW = 5;
  logic clk = 0, prog_en = 0;
  logic [3:0] prog_row = '0;
  logic [COLS-1:0] prog_data = '0;
  logic [ROWS-1:0] row_in = '0, row_act = '0;
  logic [LW-1:0] bl_level [COLS];
  logic [COLS-1:0] img [ROWS];
  int checks = 0, failures = 0, cyc = 0;

  crossbar_array #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .prog_en, .prog_row, .prog_data,
                                                  .row_in, .row_act, .bl_level);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check_all();
    for (int c = 0; c < COLS; c++) begin
      automatic int n = 0;
      for (int r = 0; r < ROWS; r++) n += int'(row_in[r] & row_act[r] & img[r][c]);
      checks++;
      if (int'(bl_level[c]) != n) begin
        failures++;
        if (failures < 5) $display("FAIL col %0d level %0d expected %0d", c, bl_level[c], n);
      end
    end
  endtask

  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        img[r] = COLS'($urandom);
        if (pass == 0 && r < 3) img[r] = '1;
        prog_en = 1; prog_row = 4'(r); prog_data = img[r];
      end
      @(negedge clk); prog_en = 0;
      row_in = '1; row_act = '1; #1; check_all();
      for (int t = 0; t < 50; t++) begin
        row_in = ROWS'($urandom); row_act = ROWS'($urandom);
        #1; check_all();
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
