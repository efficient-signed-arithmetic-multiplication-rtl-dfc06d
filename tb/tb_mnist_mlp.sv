// tb_mnist_mlp: runs one image through a 784-80-60-10 multilayer perceptron on the tile at its
// default size, the way the tile is meant to be used for MNIST classification: 8-bit signed
// weights, 8-bit unsigned pixels for the first layer and binary activations between layers.
// Weights and the image are random (the trained network is not available); the hidden
// activations are 1 where the pre-activation is positive.
//
// Each layer is cut into tile loads of at most 256 inputs (rows) by 32 outputs (ADC groups).
// For every load the testbench programs the crossbar, fills the row data buffer, runs one
// operation and adds the 32 results to the layer's partial sums, which is work outside the
// tile. Every operation's results and every layer's outputs are checked against sums computed
// here directly.
module tb_mnist_mlp;
  import cim_pkg::*;

  localparam int unsigned ROWS = 256, COLS = 256, CPA = 8, NADC = COLS / CPA;
  localparam int unsigned N0 = 784, N1 = 80, N2 = 60, N3 = 10;

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

  int checks = 0, failures = 0, loads = 0;
  longint op_cycles = 0;

  // network state
  int x0 [N0];
  int x1 [N1];
  int x2 [N2];
  int w1 [N0][N1];
  int w2 [N1][N2];
  int w3 [N2][N3];
  longint acc [N1];

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one tile load: rows r0.., outputs o0.. of a layer with weights given by get_w
  task automatic tile_load(int n_in, int n_out, int r0, int o0, int in_bits, int layer);
    int nr = (n_in - r0 > int'(ROWS)) ? int'(ROWS) : n_in - r0;
    int no = (n_out - o0 > int'(NADC)) ? int'(NADC) : n_out - o0;
    for (int r = 0; r < ROWS; r++) begin
      logic [COLS-1:0] row = '0;
      logic [15:0] xin = '0;
      if (r < nr) begin
        for (int u = 0; u < no; u++) begin
          int w = (layer == 1) ? w1[r0+r][o0+u] : (layer == 2) ? w2[r0+r][o0+u] : w3[r0+r][o0+u];
          row[u*CPA +: CPA] = 8'(w);
        end
        xin = 16'((layer == 1) ? x0[r0+r] : (layer == 2) ? x1[r0+r] : x2[r0+r]);
      end
      @(negedge clk);
      prog_en = 1; prog_row = 8'(r); prog_data = row;
      buf_wr_en = 1; buf_wr_row = 8'(r); buf_wr_data = xin;
    end
    @(negedge clk);
    prog_en = 0; buf_wr_en = 0;
    cfg.mpd_bits = 5'd8; cfg.mpr_bits = 5'(in_bits);
    cfg.mpd_signed = 1'b1; cfg.mpr_signed = 1'b0;
    cfg.log2_rows = 4'($clog2(nr)); cfg.act_log2 = 4'($clog2(ROWS));
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(posedge clk);
    @(negedge clk);
    loads++;
    op_cycles += longint'(cycles);
    for (int u = 0; u < no; u++) begin
      longint e = 0;
      for (int r = 0; r < nr; r++) begin
        int w = (layer == 1) ? w1[r0+r][o0+u] : (layer == 2) ? w2[r0+r][o0+u] : w3[r0+r][o0+u];
        int x = (layer == 1) ? x0[r0+r] : (layer == 2) ? x1[r0+r] : x2[r0+r];
        e += longint'(w) * longint'(x);
      end
      checks++;
      if (longint'($signed(unit_result[u])) != e) begin
        failures++;
        if (failures < 8) $display("FAIL layer %0d load rows %0d outputs %0d unit %0d: got %0d expected %0d",
                                   layer, r0, o0, u, $signed(unit_result[u]), e);
      end
      acc[o0+u] += longint'($signed(unit_result[u]));
    end
  endtask

  task automatic layer_run(int n_in, int n_out, int in_bits, int layer);
    for (int o = 0; o < n_out; o++) acc[o] = 0;
    for (int o0 = 0; o0 < n_out; o0 += NADC)
      for (int r0 = 0; r0 < n_in; r0 += ROWS)
        tile_load(n_in, n_out, r0, o0, in_bits, layer);
    // compare the accumulated pre-activations with the whole-layer reference
    for (int o = 0; o < n_out; o++) begin
      longint e = 0;
      for (int i = 0; i < n_in; i++) begin
        int w = (layer == 1) ? w1[i][o] : (layer == 2) ? w2[i][o] : w3[i][o];
        int x = (layer == 1) ? x0[i] : (layer == 2) ? x1[i] : x2[i];
        e += longint'(w) * longint'(x);
      end
      checks++;
      if (acc[o] != e) begin
        failures++;
        $display("FAIL layer %0d output %0d: got %0d expected %0d", layer, o, acc[o], e);
      end
    end
  endtask

  initial begin
    int best;
    longint best_v;
    cfg = '0;
    for (int i = 0; i < N0; i++) x0[i] = int'($urandom % 256);
    for (int i = 0; i < N0; i++) for (int o = 0; o < N1; o++) w1[i][o] = int'($urandom % 256) - 128;
    for (int i = 0; i < N1; i++) for (int o = 0; o < N2; o++) w2[i][o] = int'($urandom % 256) - 128;
    for (int i = 0; i < N2; i++) for (int o = 0; o < N3; o++) w3[i][o] = int'($urandom % 256) - 128;
    repeat (3) @(negedge clk);
    rst_n = 1;
    layer_run(N0, N1, 8, 1);
    for (int o = 0; o < N1; o++) x1[o] = (acc[o] > 0) ? 1 : 0;
    layer_run(N1, N2, 1, 2);
    for (int o = 0; o < N2; o++) x2[o] = (acc[o] > 0) ? 1 : 0;
    layer_run(N2, N3, 1, 3);
    best = 0; best_v = acc[0];
    for (int o = 1; o < N3; o++) if (acc[o] > best_v) begin best = o; best_v = acc[o]; end
    checks++;
    if (loads != 12 + 2 + 1) begin failures++; $display("FAIL tile loads %0d", loads); end
    $display("tile_loads=%0d operation_cycles=%0d class=%0d", loads, op_cycles, best);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
