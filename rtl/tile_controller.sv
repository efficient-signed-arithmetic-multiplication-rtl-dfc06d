// tile_controller: state machine that sequences one matrix-vector operation of the tile.
//
// For every input segment (multiplier bit, least significant first) and every row group it
// drives the segment onto the rows, waits READ_CYC cycles for the bit-lines to settle, strobes
// the sample-and-hold and scans the bit-lines of each ADC one per cycle (stage 1). On the last
// row group each conversion is followed one cycle later by a stage-2 step; then come e2 extra
// stage-2 rounds for the virtual bit-lines (signed array data), the stage-2 fin step and one
// stage-3 step. After the last segment it issues the extra stage-3 rounds for the virtual input
// segments (signed input data), the stage-3 fin step and, when the multiplicand is wider than
// the bit-lines of one ADC (split), the stage-4 steps, and finally pulses done.
//
// Derived counts (document's equations 1 to 5, with log2_rows = log2 of the rows summed):
//   S_out = mpd_bits + mpr_bits + log2_rows
//   e2    = log2_rows            when the array data are signed, else 0
//   e3    = S_out - mpr_bits     when the input data are signed, else 0
// The cfg is latched on start; start is ignored while busy. busy is high from the cycle after
// start up to and including the done cycle, for
//   1 + M*(NG*(READ_CYC+1) + (NG-1)*KS + KS+1 + e2 + 2) + e3 + 1 + (split ? NU : 0) cycles
// with M = mpr_bits, NG = ROWS >> act_log2, KS = split ? COLS_PER_ADC : mpd_bits.
// The state machine itself is this design's choice; the document says only that a state
// machine or an instruction set controls the periphery.
module tile_controller
  import cim_pkg::*;
#(
  parameter int unsigned ROWS         = 256,
  parameter int unsigned COLS_PER_ADC = 8,
  parameter int unsigned READ_CYC     = 10,
  parameter int unsigned NU           = 2     // ADCs that share a split number
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  cim_cfg_t  cfg,
  output cim_ctl_t  ctl,
  output cim_cfg_t  cfg_q,
  output logic      split,
  output logic [5:0] s_out,
  output logic      busy,
  output logic      done
);
  typedef enum logic [3:0] {
    IDLE, DRIVE, SAMPLE, SCAN, S2X, FIN2, S3, S3X, FIN3, S4, DONE
  } state_t;

  localparam int unsigned LOG2R = $clog2(ROWS);

  state_t     state;
  logic [7:0] cnt;
  logic [4:0] seg;
  logic [8:0] grp;
  logic [8:0] ng_last;
  logic [7:0] ks;
  logic [3:0] e2;
  logic [5:0] e3;
  logic       last_grp;

  assign split    = cfg_q.mpd_bits > 5'(COLS_PER_ADC);
  assign ks       = split ? 8'(COLS_PER_ADC) : {3'b0, cfg_q.mpd_bits};
  assign s_out    = {1'b0, cfg_q.mpd_bits} + {1'b0, cfg_q.mpr_bits} + {2'b0, cfg_q.log2_rows};
  assign e2       = cfg_q.mpd_signed ? cfg_q.log2_rows : 4'd0;
  assign e3       = cfg_q.mpr_signed ? (s_out - {1'b0, cfg_q.mpr_bits}) : 6'd0;
  assign ng_last  = 9'((ROWS >> cfg_q.act_log2) - 1);
  assign last_grp = (grp == ng_last);
  assign busy     = (state != IDLE);
  assign done     = (state == DONE);

  always_comb begin
    ctl          = '0;
    ctl.seg      = seg[3:0];
    ctl.grp      = grp;
    ctl.s1_first = (grp == 9'd0);
    ctl.col      = cnt;
    unique case (state)
      IDLE:   begin
        ctl.s3_clear = start;
        ctl.s4_clear = start;
      end
      DRIVE:  ctl.s2_clear = (grp == 9'd0) && (cnt == 8'd0);
      SAMPLE: ctl.sample = 1'b1;
      SCAN:   begin
        ctl.s1_en   = (cnt < ks);
        ctl.s2_step = last_grp && (cnt != 8'd0);
        ctl.s2_idx  = 6'(cnt - 8'd1);
      end
      S2X:    begin
        ctl.s2_step = 1'b1;
        ctl.s2_idx  = 6'(ks + cnt);
      end
      FIN2:   ctl.s2_fin = 1'b1;
      S3:     begin
        ctl.s3_step = 1'b1;
        ctl.s3_idx  = {1'b0, seg};
      end
      S3X:    begin
        ctl.s3_step = 1'b1;
        ctl.s3_idx  = 6'({1'b0, cfg_q.mpr_bits} + 6'(cnt));
      end
      FIN3:   ctl.s3_fin = 1'b1;
      S4:     begin
        ctl.s4_step = 1'b1;
        ctl.s4_idx  = cnt[3:0];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      seg   <= '0;
      grp   <= '0;
      cfg_q <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          cfg_q <= cfg;
          cnt   <= '0;
          seg   <= '0;
          grp   <= '0;
          state <= DRIVE;
        end
        DRIVE: begin
          if (cnt == 8'(READ_CYC - 1)) begin
            cnt   <= '0;
            state <= SAMPLE;
          end else cnt <= cnt + 8'd1;
        end
        SAMPLE: begin
          cnt   <= '0;
          state <= SCAN;
        end
        SCAN: begin
          if (!last_grp && cnt == ks - 8'd1) begin
            cnt   <= '0;
            grp   <= grp + 9'd1;
            state <= DRIVE;
          end else if (last_grp && cnt == ks) begin
            cnt   <= '0;
            state <= (e2 != 4'd0) ? S2X : FIN2;
          end else cnt <= cnt + 8'd1;
        end
        S2X: begin
          if (cnt == 8'(e2) - 8'd1) begin
            cnt   <= '0;
            state <= FIN2;
          end else cnt <= cnt + 8'd1;
        end
        FIN2: state <= S3;
        S3: begin
          cnt <= '0;
          if (seg == cfg_q.mpr_bits - 5'd1) begin
            state <= (e3 != 6'd0) ? S3X : FIN3;
          end else begin
            seg   <= seg + 5'd1;
            grp   <= '0;
            state <= DRIVE;
          end
        end
        S3X: begin
          if (cnt == 8'(e3) - 8'd1) begin
            cnt   <= '0;
            state <= FIN3;
          end else cnt <= cnt + 8'd1;
        end
        FIN3: begin
          cnt   <= '0;
          state <= split ? S4 : DONE;
        end
        S4: begin
          if (cnt == 8'(NU - 1)) state <= DONE;
          else cnt <= cnt + 8'd1;
        end
        DONE: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // configuration rules: the multiplicand fits the ADCs that may share it, sizes are non-zero
  assert property (@(posedge clk) disable iff (!rst_n) (state == IDLE && start) |->
                   (cfg.mpd_bits != 5'd0 && cfg.mpr_bits != 5'd0 &&
                    int'(cfg.mpd_bits) <= int'(NU * COLS_PER_ADC) && int'(cfg.act_log2) <= LOG2R))
    else $error("invalid configuration");
  assert property (@(posedge clk) disable iff (!rst_n) (state == SCAN) |-> (ks != 8'd0))
    else $error("zero-width multiplicand");
endmodule
