`timescale 1ps/1fs
// adpll_fmcw_top: 60 GHz all-digital PLL with multi-rate two-point FMCW
// modulation.
//
// Reference side (CKR domain): FREF is retimed by the DCO's own divided clock
// into CKR; the reference phase accumulates the channel FCW plus the
// modulation compensation; the variable phase (CKV/32 edge count plus the
// TDC fraction normalised by 1/K_TDC) is subtracted to give phi_E; glitches
// are removed; the gear-shifting loop filter and the loop controller turn
// phi_E into CB, MB and FB_Loop tuning words, FB_Loop being decoded into its
// two sub-banks around FB_Mod and SigmaDelta-dithered at CKV/64.
// Direct side (CKM domain, CKV/128 .. CKV/1024): the linearization table in
// three 8-kbit SRAMs drives FB_Mod, and during modulation also CB and MB
// through the mod_en multiplexer; the FB_Mod fraction is corrected for the
// dither-cell mismatch and SigmaDelta-dithered. An FSK path at the reference
// rate can drive FB_Mod instead for two-point FSK tests. TDC gain
// calibration, an averaged frequency counter and the shared divider support
// the calibrations, a closed-loop fine-bank gain calibration sets the FSK
// gain, and a calculator turns measured switchover words into
// table entries. All of that sits in adpll_core. The DCO and the TDC are
// behavioural models beside it in this top. The FREF slicer and the power
// amplifier are outside it: FREF enters as a digital clock and CKV leaves as
// the RF output. The structure and the clock plan follow the document; the
// models' simplifications (ideal linear banks, uniform TDC stages) and the
// port list are this design's own.
// All configuration inputs are static or change only while the block that
// uses them is idle; lut_* writes and cal_* records use the CKM clock and
// must be made while mod_en is low.
module adpll_fmcw_top
  import adpll_pkg::*;
(
  input  logic                  rst_n,
  input  logic                  fref,         // sliced reference clock
  input  logic                  dco_en,
  // channel and loop
  input  logic [FCW_W-1:0]      fcw,          // f_CKV / (32 f_R), Q8.20
  input  logic                  acq_start,
  input  logic [15:0]           cb_cycles, mb_cycles, trk1_cycles,
  input  logic [4:0]            alpha_cb, alpha_mb, alpha_trk1, alpha_trk2,
  input  logic [4:0]            rho_sh,
  input  logic [3:0]            lambda_sh [4],
  input  logic [NORM_W-1:0]     norm,         // 32 f_R / K_DCO (1 MHz assumed)
  input  logic [CB_W-1:0]       cb_init,
  input  logic [MB_W-1:0]       mb_init,
  input  logic [PH_W-1:0]       qm_threshold,
  input  logic                  sd_order2,    // FB_Loop SigmaDelta order
  // TDC gain calibration and frequency measurement
  input  logic                  tdc_cal_start,
  input  logic [3:0]            tdc_cal_log2n,
  input  logic                  fm_start,
  input  logic [3:0]            fm_log2n,
  // FMCW modulation
  input  logic                  mod_en,
  input  logic [1:0]            sel_mod,      // CKM = CKV/128 * 2^-sel_mod
  input  logic [LUT_AW-1:0]     start_idx, end_idx,
  input  logic [MB_W-1:0]       mb_last,
  input  logic [23:0]           n_half_ckm,
  input  logic [31:0]           comp_step,
  input  logic [23:0]           n_half_ckr,
  input  logic [EPS_W-1:0]      eps_mag,
  input  logic                  eps_neg,
  input  logic                  lut_we,
  input  logic [LUT_AW-1:0]     lut_waddr,
  input  lut_entry_t            lut_wdata,
  input  logic                  cal_valid,    // switchover record for the table
  input  logic [LUT_AW-1:0]     cal_idx,
  input  logic [LUT_DW-1:0]     cal_fb_min, cal_fb_max,
  input  logic [23:0]           cal_dn,
  output logic                  cal_ready,
  output logic                  kc_busy,
  output logic                  kc_done,
  output logic [15:0]           kc_gain,      // measured 32 f_R / K_DCO, Q12.4
  // FSK test modulation
  input  logic                  fsk_en,
  input  logic                  fsk_data,
  input  logic [FCW_W-1:0]      fsk_dev,
  input  logic [15:0]           fsk_gain,
  input  logic                  kc_start,     // fine-bank gain calibration
  input  logic [3:0]            kc_log2n,
  input  logic [15:0]           kc_settle,
  input  logic [15:0]           kc_dev,
  // outputs
  output logic                  ckv,          // RF output to the PA
  output logic                  ckv32,        // divide-by-32 test output
  output logic                  ckr,
  output logic                  ckm,
  output real                   dco_freq_hz,
  output loop_mode_e            mode,
  output logic signed [PH_W-1:0] phe,         // glitch-free phase error
  output logic                  glitch,
  output logic                  clk_quality_bad,
  output logic [CB_W-1:0]       cb_dco,
  output logic [MB_W-1:0]       mb_dco,
  output logic signed [7:0]     fbl_int,
  output logic [FBM_INT_W-1:0]  fbm_int_dco,
  output logic                  switch_evt,
  output logic                  turn_evt,
  output logic                  ramp_up,
  output logic [INVK_W-1:0]     inv_ktdc,
  output logic                  tdc_cal_busy,
  output logic                  tdc_cal_done,
  output logic [PH_W-1:0]       fm_freq,
  output logic                  fm_busy,
  output logic                  fm_done,
  output logic                  comp_up
);
  logic [TDC_W-1:0]    tdc_code, period_code;
  logic [FBL_BITS-1:0] fb_loop1, fb_loop2;
  logic [FBM_BITS-1:0] fb_mod;
  logic signed [2:0]   dith_loop, dith_mod;

  adpll_core u_core (.*);

  tdc_model u_tdc (.fref, .ckv32, .tdc_code, .period_code);

  dco_model u_dco (.en(dco_en), .cb(cb_dco), .mb(mb_dco), .fb_loop1, .fb_loop2, .fb_mod,
                   .dith_loop, .dith_mod, .ckv, .freq_hz(dco_freq_hz));
endmodule
