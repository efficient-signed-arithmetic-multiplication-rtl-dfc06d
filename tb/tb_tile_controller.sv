// tb_tile_controller: runs random configurations through the controller alone and checks the
// control sequence it issues: sample strobes only after the read time with stable drive,
// one per segment and row group; the number of conversions; stage-2 steps per segment
// (columns plus virtual bit-lines); stage-3 step indices in order, including the virtual input
// segments; stage-2 fin before each stage-3 step; stage-4 steps only for split numbers; and the
// latency from start to done.
module tb_tile_controller;
  import cim_pkg::*;
  localparam int unsigned ROWS = 16, CPA = 4, READ_CYC = 3, NU = 2;
  logic clk = 0, rst_n = 0, start = 0;
  cim_cfg_t cfg, cfg_q;
  cim_ctl_t ctl;
  logic split, busy, done;
  logic [5:0] s_out;
  int checks = 0, failures = 0, cyc = 0;
  int n_samp, n_conv, n_s2, n_s3, n_s4, n_fin2, stable, next_s3, lat;
  bit fin2_seen;
  logic [3:0] last_seg;
  logic [8:0] last_grp;

  tile_controller #(.ROWS(ROWS), .COLS_PER_ADC(CPA), .READ_CYC(READ_CYC), .NU(NU)) dut (
    .clk, .rst_n, .start, .cfg, .ctl, .cfg_q, .split, .s_out, .busy, .done);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic err(string msg);
    failures++;
    if (failures < 8) $display("FAIL %s", msg);
  endtask

  // protocol monitor
  always @(posedge clk) if (rst_n && busy) begin
    lat++;
    if (ctl.seg == last_seg && ctl.grp == last_grp) stable++; else stable = 1;
    last_seg = ctl.seg; last_grp = ctl.grp;
    if (ctl.sample) begin
      n_samp++;
      checks++; if (stable < READ_CYC + 1) err("sample before read time");
    end
    if (ctl.s1_en) n_conv++;
    if (ctl.s2_step) n_s2++;
    if (ctl.s2_fin) begin n_fin2++; fin2_seen = 1; end
    if (ctl.s3_step) begin
      checks++;
      if (int'(ctl.s3_idx) != next_s3) err($sformatf("stage-3 index %0d expected %0d", ctl.s3_idx, next_s3));
      if (int'(ctl.s3_idx) < int'(cfg_q.mpr_bits)) begin
        checks++; if (!fin2_seen) err("stage-3 step without stage-2 fin");
        fin2_seen = 0;
      end
      next_s3++; n_s3++;
    end
    if (ctl.s4_step) n_s4++;
  end

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      automatic int k = 1 + $urandom % (2 * CPA), m = 1 + $urandom % 8;
      automatic bit sk = 1'($urandom), sm = 1'($urandom);
      automatic int l2 = $urandom % 5, al = $urandom % 5;
      automatic int ng = ROWS >> al;
      automatic bit sp = (k > CPA);
      automatic int ks = sp ? CPA : k;
      automatic int e2 = sk ? l2 : 0, e3 = sm ? k + l2 : 0;
      automatic int exp_lat = 1 + m * (ng * (READ_CYC + 1) + (ng - 1) * ks + ks + 1 + e2 + 2) + e3 + 1 + (sp ? NU : 0);
      cfg.mpd_bits = 5'(k); cfg.mpr_bits = 5'(m); cfg.mpd_signed = sk; cfg.mpr_signed = sm;
      cfg.log2_rows = 4'(l2); cfg.act_log2 = 4'(al);
      n_samp = 0; n_conv = 0; n_s2 = 0; n_s3 = 0; n_s4 = 0; n_fin2 = 0; next_s3 = 0; lat = 0;
      fin2_seen = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      wait (done);
      @(posedge clk);
      @(negedge clk);
      checks++; if (lat != exp_lat) err($sformatf("latency %0d expected %0d", lat, exp_lat));
      checks++; if (n_samp != m * ng) err($sformatf("samples %0d expected %0d", n_samp, m * ng));
      checks++; if (n_conv != m * ng * ks) err($sformatf("conversions %0d", n_conv));
      checks++; if (n_s2 != m * (ks + e2)) err($sformatf("stage-2 steps %0d expected %0d", n_s2, m * (ks + e2)));
      checks++; if (n_fin2 != m) err("stage-2 fin count");
      checks++; if (n_s3 != m + e3) err($sformatf("stage-3 steps %0d expected %0d", n_s3, m + e3));
      checks++; if (n_s4 != (sp ? NU : 0)) err("stage-4 steps");
      checks++; if (int'(s_out) != k + m + l2) err("s_out");
      checks++; if (busy) err("busy after done");
    end
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
