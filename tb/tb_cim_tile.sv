// tb_cim_tile: end-to-end test of the CIM tile at reduced size (16 x 32 array, 4 bit-lines per ADC).
//
// Programs the crossbar with random bits and the row data buffer with random multipliers, runs
// a set of operations and compares every result with a sum of products computed here directly
// from the programmed data. Configurations cover unsigned and signed array data and input data
// (mode switches between runs), multi-step row activation, partially filled arrays and numbers
// split over two ADCs (stage 4). It counts how often each mechanism occurred (virtual bit-line
// rounds, virtual input-segment rounds, row-group steps, stage-4 steps, signed/unsigned
// switches) and fails a mechanism that never happened. The cycle count of every operation is
// checked against the controller's latency formula.
module tb_cim_tile;
  import cim_pkg::*;

  localparam int unsigned ROWS         = 16;
  localparam int unsigned COLS         = 32;
  localparam int unsigned COLS_PER_ADC = 4;
  localparam int unsigned ADC_BITS     = 5;
  localparam int unsigned MAX_DW       = 8;
  localparam int unsigned READ_CYC     = 3;
  localparam int unsigned NADC  = COLS / COLS_PER_ADC;
  localparam int unsigned NPAIR = NADC / 2;
  localparam int unsigned RW    = $clog2(ROWS);
  localparam int unsigned OUT_W = 2 * MAX_DW + $clog2(ROWS);
  localparam int unsigned FW    = OUT_W + COLS_PER_ADC;

  logic clk = 0, rst_n = 0;
  logic prog_en = 0, buf_wr_en = 0, start = 0;
  logic [RW-1:0] prog_row = '0, buf_wr_row = '0;
  logic [COLS-1:0] prog_data = '0;
  logic [MAX_DW-1:0] buf_wr_data = '0;
  cim_cfg_t cfg;
  logic busy, done;
  logic [31:0] cycles;
  logic [OUT_W-1:0] unit_result [NADC];
  logic [FW-1:0] pair_result [NPAIR];

  cim_tile #(.ROWS(ROWS), .COLS(COLS), .COLS_PER_ADC(COLS_PER_ADC), .ADC_BITS(ADC_BITS),
             .MAX_DW(MAX_DW), .READ_CYC(READ_CYC)) dut (
    .clk, .rst_n, .prog_en, .prog_row, .prog_data, .buf_wr_en, .buf_wr_row, .buf_wr_data,
    .start, .cfg, .busy, .done, .cycles, .unit_result, .pair_result);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int n_vbl = 0, n_vis = 0, n_grp = 0, n_s4 = 0, n_switch = 0, n_ops = 0;
  logic last_mode_valid = 0;
  logic [1:0] last_mode;

  logic [COLS-1:0]   xb  [ROWS];
  logic [MAX_DW-1:0] buf_q [ROWS];

  // mechanism counters, observed on the control word
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.ctl.s2_step && int'(dut.u_ctrl.ctl.s2_idx) >= int'(dut.u_ctrl.ks)) n_vbl++;
    if (dut.u_ctrl.ctl.s3_step && int'(dut.u_ctrl.ctl.s3_idx) >= int'(dut.u_ctrl.cfg_q.mpr_bits)) n_vis++;
    if (dut.u_ctrl.ctl.sample && dut.u_ctrl.ctl.grp != 0) n_grp++;
    if (dut.u_ctrl.ctl.s4_step) n_s4++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint field(logic [COLS-1:0] row, int lo, int w, bit sgn);
    longint v = 0;
    for (int i = 0; i < w; i++) v |= longint'(row[lo+i]) << i;
    if (sgn && row[lo+w-1]) v -= (longint'(1) << w);
    return v;
  endfunction

  function automatic longint inval(logic [MAX_DW-1:0] x, int w, bit sgn);
    longint v = 0;
    for (int i = 0; i < w; i++) v |= longint'(x[i]) << i;
    if (sgn && x[w-1]) v -= (longint'(1) << w);
    return v;
  endfunction

  task automatic load(int nrows, int mbits);
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) xb[r][c] = 1'($urandom);
      buf_q[r] = '0;
      if (r < nrows) for (int b = 0; b < mbits; b++) buf_q[r][b] = 1'($urandom);
    end
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      prog_en = 1; prog_row = RW'(r); prog_data = xb[r];
      buf_wr_en = 1; buf_wr_row = RW'(r); buf_wr_data = buf_q[r];
    end
    @(negedge clk);
    prog_en = 0; buf_wr_en = 0;
  endtask

  task automatic run(int k, int m, bit sk, bit sm, int nrows, int act_log2);
    int l2 = $clog2(nrows);
    int ng = ROWS >> act_log2;
    bit split = (k > COLS_PER_ADC);
    int ks = split ? COLS_PER_ADC : k;
    int e2 = sk ? l2 : 0;
    int e3 = sm ? (k + l2) : 0;
    int lat;
    bit rs = sk | sm;
    cfg.mpd_bits = 5'(k); cfg.mpr_bits = 5'(m);
    cfg.mpd_signed = sk; cfg.mpr_signed = sm;
    cfg.log2_rows = 4'(l2); cfg.act_log2 = 4'(act_log2);
    if (last_mode_valid && last_mode != {sk, sm}) n_switch++;
    last_mode = {sk, sm}; last_mode_valid = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(posedge clk);
    @(negedge clk);
    n_ops++;
    lat = 1 + m * (ng * (READ_CYC + 1) + (ng - 1) * ks + ks + 1 + e2 + 2) + e3 + 1 + (split ? 2 : 0);
    checks++;
    if (int'(cycles) != lat) begin
      failures++;
      $display("FAIL latency k=%0d m=%0d: got %0d expected %0d", k, m, cycles, lat);
    end
    if (!split) begin
      for (int u = 0; u < NADC; u++) begin
        longint exp_v = 0, got;
        for (int r = 0; r < ROWS; r++)
          exp_v += inval(buf_q[r], m, sm) * field(xb[r], u * COLS_PER_ADC, k, sk);
        got = rs ? longint'($signed(unit_result[u])) : longint'(unit_result[u]);
        checks++;
        if (got != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL unit %0d k=%0d m=%0d s=%0d%0d: got %0d expected %0d",
                                      u, k, m, sk, sm, got, exp_v);
        end
      end
    end else begin
      for (int p = 0; p < NPAIR; p++) begin
        longint exp_v = 0, got;
        for (int r = 0; r < ROWS; r++)
          exp_v += inval(buf_q[r], m, sm) * field(xb[r], 2 * p * COLS_PER_ADC, k, sk);
        got = rs ? longint'($signed(pair_result[p])) : longint'(pair_result[p]);
        checks++;
        if (got != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL pair %0d k=%0d m=%0d s=%0d%0d: got %0d expected %0d",
                                      p, k, m, sk, sm, got, exp_v);
        end
      end
    end
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // one dataset, operations in every signedness
    load(ROWS, MAX_DW);
    run(4, 4, 0, 0, ROWS, $clog2(ROWS));
    run(4, 4, 1, 0, ROWS, $clog2(ROWS));
    run(4, 4, 1, 1, ROWS, $clog2(ROWS));
    run(4, 4, 0, 1, ROWS, $clog2(ROWS));
    run(3, 6, 1, 1, ROWS, $clog2(ROWS));
    run(1, 1, 1, 1, ROWS, $clog2(ROWS));
    run(4, 8, 1, 0, ROWS, $clog2(ROWS));
    // multi-step row activation (stage 1 accumulation)
    run(4, 4, 1, 1, ROWS, 2);
    run(4, 3, 0, 0, ROWS, 1);
    // numbers split over two ADCs (stage 4)
    run(8, 8, 1, 1, ROWS, $clog2(ROWS));
    run(7, 5, 0, 0, ROWS, $clog2(ROWS));
    run(6, 4, 1, 0, ROWS, 3);
    run(5, 6, 0, 1, ROWS, $clog2(ROWS));
    // fewer rows holding data: fewer virtual bit-lines
    load(5, MAX_DW);
    run(4, 4, 1, 1, 5, $clog2(ROWS));
    run(4, 6, 1, 0, 5, 2);
    repeat (4) begin
      load(ROWS, MAX_DW);
      run(1 + $urandom % MAX_DW, 1 + $urandom % MAX_DW, 1'($urandom), 1'($urandom), ROWS, 1 + $urandom % $clog2(ROWS));
    end
    checks++; if (n_vbl == 0)    begin failures++; $display("FAIL no virtual bit-line rounds"); end
    checks++; if (n_vis == 0)    begin failures++; $display("FAIL no virtual input segments"); end
    checks++; if (n_switch == 0) begin failures++; $display("FAIL no signed/unsigned switch"); end
    checks++; if (n_grp == 0)    begin failures++; $display("FAIL no multi-step row activation"); end
    checks++; if (n_s4 == 0)     begin failures++; $display("FAIL no stage-4 combining"); end
    $display("ops=%0d virtual_bitline_rounds=%0d virtual_input_rounds=%0d row_group_steps=%0d stage4_steps=%0d mode_switches=%0d",
             n_ops, n_vbl, n_vis, n_grp, n_s4, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
