`timescale 1ps/1fs
// adpll_pkg: fixed-point formats, widths and shared types of the 60 GHz
// ADPLL-based FMCW transmitter.
//
// Phase is carried in units of one CKV/32 period (the variable clock seen by
// the phase detector). Integer phase is PH_INT bits wide, matching the 12-bit
// variable-phase counter (10-bit synchronous plus 2-bit asynchronous stage);
// the fractional part has PH_FRAC bits. The frequency command word uses the
// same fractional format so that it can be accumulated straight into the
// reference phase. DCO tuning words are in units of one fine-bank (FB) LSB.
// Bank sizes, fractional widths and encodings not given by the document are
// this design's own choices and are listed in the README.
package adpll_pkg;

  // ---------------- phase domain ----------------
  localparam int PH_INT   = 12;               // variable-phase counter width
  localparam int PH_FRAC  = 20;               // fractional phase bits
  localparam int PH_W     = PH_INT + PH_FRAC; // full phase word
  localparam int FCW_INT  = 8;                // FCW up to 255 (CKV/32 over FREF)
  localparam int FCW_W    = FCW_INT + PH_FRAC;

  // ---------------- TDC ----------------
  localparam int TDC_W    = 6;                // delay-chain length 64 stages
  localparam int INVK_W   = 16;               // 1/K_TDC, unsigned Q0.20 per delay

  // ---------------- loop filter / tuning words ----------------
  localparam int LF_W     = 40;               // loop-filter word, PH_FRAC frac bits
  localparam int NORM_W   = 16;               // 32*f_R/K_DCO, unsigned integer
  localparam int OTW_FRAC = 10;               // fractional FB bits sent to the SigmaDelta

  // ---------------- DCO banks ----------------
  localparam int CB_W       = 5;              // coarse bank index
  localparam int MB_W       = 4;              // mid-coarse bank index
  localparam int FBL_HALF   = 11;             // half of one FB_Loop sub-bank
  localparam int FBL_BITS   = 2 * FBL_HALF;   // FB_Loop1 and FB_Loop2 each
  localparam int FBM_BITS   = 38;             // FB_Mod integer (thermometer) bits
  localparam int FBM_INT_W  = 6;              // FB_Mod integer word
  localparam int FBM_FRAC_W = 10;             // FB_Mod fractional word (document: 10 bit)
  localparam int EPS_W      = 8;              // |eps| of the dither-bit mismatch (document: 8 bit)

  // ---------------- modulation LUT ----------------
  localparam int LUT_AW    = CB_W + MB_W;     // (c,m) index, 512 entries
  localparam int LUT_DW    = 16;              // 512 x 16 = 8 kbit per SRAM
  localparam int STEP_FRAC = 16;              // FB_step: 16 fractional bits of an FB LSB
  localparam int COMP_XF   = 12;              // extra fractional bits of the compensation ramp

  // Loop operating modes (gear shifting and bank acquisition).
  typedef enum logic [2:0] {
    M_IDLE  = 3'd0,   // loop open, tuning words held at their start values
    M_CB    = 3'd1,   // coarse-bank acquisition, type-I
    M_MB    = 3'd2,   // mid-coarse-bank acquisition, type-I
    M_TRK1  = 3'd3,   // fine-bank tracking, type-I, wide bandwidth
    M_TRK2  = 3'd4    // fine-bank tracking, type-II + 4th-order IIR, narrow
  } loop_mode_e;

  // One entry of the multi-bank linearization table.
  typedef struct packed {
    logic [LUT_DW-1:0] fb_min;   // FB_Mod word at the lower switchover, Q6.10
    logic [LUT_DW-1:0] fb_max;   // FB_Mod word at the upper switchover, Q6.10
    logic [LUT_DW-1:0] fb_step;  // FB_Mod increment per CKM cycle, Q0.16
  } lut_entry_t;

endpackage
