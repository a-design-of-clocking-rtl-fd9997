`timescale 1ps/1fs
// dcc_pkg: sizes and types shared by the duty-cycle corrector (DCC).
//
// The DCDL (digitally controlled delay line) is set by an 8-bit code: the upper
// 3 bits select the coarse delay line (CDL), the lower 5 bits the phase
// interpolator of the fine delay line (FDL). The counter of the counter-based
// half-cycle delay line (HCDL) repeats the DCDL up to NCNT_MAX = 16 times in
// normal operation, so during training, which measures a full period, it must
// count up to 2*NCNT_MAX = 32 and needs 6 bits. Training takes 34 input
// clock cycles: 2 for the repeat count and 4 for each of the 8 code bits.
// All of these numbers follow the published design; the state encoding is
// this implementation's own.
package dcc_pkg;
  localparam int CDL_BITS     = 3;
  localparam int FDL_BITS     = 5;
  localparam int CODE_W       = CDL_BITS + FDL_BITS;
  localparam int NCNT_MAX     = 16;
  localparam int CNT_W        = 6;
  localparam int NCNT_CYCLES  = 2;
  localparam int BIT_CYCLES   = 4;
  localparam int TRAIN_CYCLES = NCNT_CYCLES + BIT_CYCLES * CODE_W;  // 34

  // ST_NCNT: measure the repeat count; ST_DCDL: binary search of the code;
  // ST_NORMAL: training blocks idle, the corrector runs on the stored result.
  typedef enum logic [1:0] {
    ST_NCNT   = 2'd0,
    ST_DCDL   = 2'd1,
    ST_NORMAL = 2'd2
  } dcc_state_e;
endpackage
