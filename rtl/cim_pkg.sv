// cim_pkg: types shared by the CIM tile.
//
// cim_cfg_t is the run-time configuration of one operation: data sizes and signedness of the
// multiplicand (array data, stored in the crossbar, one bit per cell) and of the multiplier
// (input data, fed bit by bit through 1-bit row drivers), the number of rows holding data and
// the number of rows activated per analog step. Changing it switches between signed and
// unsigned arithmetic and between data sizes without touching the hardware or the data mapping.
// unit_cfg_t is the part of it one addition unit needs. cim_ctl_t is the per-cycle control word
// the tile controller sends to the analog models and the addition units.
package cim_pkg;

  typedef struct packed {
    logic [4:0] mpd_bits;    // multiplicand (array data) width, 1..MAX_DW
    logic [4:0] mpr_bits;    // multiplier (input data) width, 1..MAX_DW
    logic       mpd_signed;  // array data in two's complement
    logic       mpr_signed;  // input data in two's complement
    logic [3:0] log2_rows;   // ceil(log2(rows holding data)); number of virtual bit-lines
    logic [3:0] act_log2;    // log2(rows activated per analog step)
  } cim_cfg_t;

  typedef struct packed {
    logic [4:0] k_bits;      // columns of this unit that hold the number, 1..columns per ADC
    logic       mpd_signed;  // this unit holds the sign bit of a signed multiplicand
    logic [3:0] e2;          // virtual bit-lines (stage-2 extra rounds) when mpd_signed
    logic [4:0] m_bits;      // multiplier width
    logic       mpr_signed;  // multiplier signed: virtual input segments are applied
    logic [5:0] s_out;       // output width of a signed product sum, Eq. S_out
  } unit_cfg_t;

  typedef struct packed {
    // analog side
    logic [3:0] seg;         // multiplier bit driven onto the rows
    logic [8:0] grp;         // row group being activated
    logic       sample;      // sample-and-hold strobe
    // stage 1 (one ADC conversion per cycle)
    logic       s1_en;
    logic       s1_first;    // first row group: load instead of accumulate
    logic [7:0] col;         // bit-line within the ADC group
    // stage 2 (sliding over columns)
    logic       s2_clear;
    logic       s2_step;
    logic [5:0] s2_idx;
    logic       s2_fin;
    // stage 3 (sliding over input segments)
    logic       s3_clear;
    logic       s3_step;
    logic [5:0] s3_idx;
    logic       s3_fin;
    // stage 4 (combining units that share a number)
    logic       s4_clear;
    logic       s4_step;
    logic [3:0] s4_idx;
  } cim_ctl_t;

endpackage
