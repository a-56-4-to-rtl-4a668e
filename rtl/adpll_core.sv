`timescale 1ps/1fs
// adpll_core: the synthesizable digital part of the 60 GHz all-digital PLL
// with multi-rate two-point FMCW modulation (everything but the DCO and TDC).
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
// the calibrations; a closed-loop fine-bank gain calibration sets the FSK
// gain (replacing fsk_gain once it has run); the table-entry calculator turns measured switchover
// words into FB_step and writes the entries.
// Interface: the DCO's CKV and the TDC's two codes come in; thermometer cell
// enables and dither words for the four DCO banks go out. All configuration
// inputs are static or change only while the block that uses them is idle;
// lut_* writes and cal_* records use the CKM clock and must be made while
// mod_en is low; a direct lut_we write has priority over the calculator.
// Follows the document: the block diagram, the clock rates, the word splits and
// the table organisation. Own choices: the word widths, the bank-switching
// sequencer, the FSK path and the mux rules (see each module's header).
module adpll_core
  import adpll_pkg::*;
(
  input  logic                  rst_n,
  input  logic                  fref,         // sliced reference clock
  input  logic                  ckv,          // DCO output
  input  logic [TDC_W-1:0]      tdc_code,     // FREF-to-CKV/32 delay, TDC delays
  input  logic [TDC_W-1:0]      period_code,  // CKV/32 period, TDC delays
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
  output logic                  ckv32,        // CKV/32, also clocks the TDC
  output logic                  ckr,
  output logic                  ckm,
  // DCO control words
  output logic [FBL_BITS-1:0]   fb_loop1, fb_loop2,
  output logic [FBM_BITS-1:0]   fb_mod,
  output logic signed [2:0]     dith_loop, dith_mod,
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
  output logic                  comp_up       // direction of the compensation ramp
);
  // ---------------- clocks ----------------
  logic ckv64, ckv128, capture, sel_edge;
  divider_chain u_div (.ckv, .rst_n, .sel_mod, .ckv32, .ckv64, .ckv128, .ckm);

  fref_retimer u_rt (.ckv32, .ckv128, .rst_n, .fref, .sel_edge, .capture, .ckr);

  // ---------------- phase detection ----------------
  logic [PH_FRAC-1:0] eps;
  logic [PH_INT-1:0]  rv, rv_count;
  logic [PH_W-1:0]    rr, phv;
  logic signed [PH_W-1:0] phe_raw;
  logic signed [FCW_W-1:0] comp_fmcw, comp_fsk, comp;

  tdc_normalizer u_tn (.tdc_code, .inv_ktdc, .eps, .sel_edge);
  tdc_gain_cal u_tcal (.ckr, .rst_n, .start(tdc_cal_start), .log2n(tdc_cal_log2n),
                       .period_code, .busy(tdc_cal_busy), .done(tdc_cal_done), .inv_ktdc);
  var_phase_counter u_vc (.ckv32, .rst_n, .capture, .count(rv_count), .rv);

  logic signed [FCW_W-1:0] kc_ofs;
  logic                    kc_valid;
  logic [15:0]             fsk_gain_used;
  assign comp = comp_fmcw + comp_fsk + kc_ofs;
  ref_phase_accum u_ra (.ckr, .rst_n, .clr(1'b0), .en(1'b1), .fcw, .comp, .rr);
  phase_detector  u_pd (.ckr, .rst_n, .rr, .rv, .eps, .sel_edge, .phe(phe_raw), .phv);

  logic track_on;
  glitch_remover u_gr (.ckr, .rst_n, .phe_in(phe_raw), .track_on, .qm_threshold,
                       .phe_out(phe), .phe_freeze(glitch), .clk_quality_bad);

  freq_meas u_fm (.ckr, .rst_n, .start(fm_start), .log2n(fm_log2n), .phv,
                  .busy(fm_busy), .done(fm_done), .freq(fm_freq));

  // ---------------- loop filter and bank control ----------------
  logic signed [PH_W-1:0] lf_phe;
  logic signed [LF_W-1:0] lf_out;
  logic                   lf_clr, lf_type2, lf_iir_en;
  logic [4:0]             lf_alpha_sh;
  logic [CB_W-1:0]        cb_loop;
  logic [MB_W-1:0]        mb_loop;
  logic [OTW_FRAC-1:0]    fbl_frac;

  loop_filter u_lf (.ckr, .rst_n, .clr(lf_clr), .phe(lf_phe), .type2(lf_type2),
                    .iir_en(lf_iir_en), .lambda_sh, .alpha_sh(lf_alpha_sh), .rho_sh, .lf_out);
  loop_ctrl u_lc (.ckr, .rst_n, .start(acq_start), .cb_cycles, .mb_cycles, .trk1_cycles,
                  .alpha_cb, .alpha_mb, .alpha_trk1, .alpha_trk2, .norm, .cb_init, .mb_init,
                  .phe, .lf_out, .mode, .lf_phe, .lf_clr, .lf_alpha_sh, .lf_type2,
                  .lf_iir_en, .track_on, .cb(cb_loop), .mb(mb_loop), .fbl_int, .fbl_frac);

  // ---------------- FMCW direct path and table ----------------
  lut_entry_t          lut_rdata;
  logic                lut_rd;
  logic [LUT_AW-1:0]   lut_raddr, lut_a;
  logic [CB_W-1:0]     cb_mod;
  logic [MB_W-1:0]     mb_mod;
  logic [FBM_INT_W-1:0]  fbm_int_fm, fbm_int_fsk;
  logic [FBM_FRAC_W-1:0] fbm_frac_fm, fbm_frac_fsk, fbm_frac, fbm_frac_c;
  logic                mod_running;

  logic                cal_we, tbl_we;
  logic [LUT_AW-1:0]   cal_waddr, tbl_waddr;
  lut_entry_t          cal_wdata, tbl_wdata;

  lut_cal u_lut_cal (.clk(ckm), .rst_n, .in_valid(cal_valid), .in_ready(cal_ready),
                     .in_idx(cal_idx), .in_fb_min(cal_fb_min), .in_fb_max(cal_fb_max),
                     .in_dn(cal_dn), .tbl_we(cal_we), .tbl_addr(cal_waddr), .tbl_data(cal_wdata));

  assign tbl_we    = lut_we | cal_we;
  assign tbl_waddr = lut_we ? lut_waddr : cal_waddr;
  assign tbl_wdata = lut_we ? lut_wdata : cal_wdata;
  assign lut_a = tbl_we ? tbl_waddr : lut_raddr;
  sram_sp u_sram_min  (.clk(ckm), .en(tbl_we | lut_rd), .we(tbl_we), .addr(lut_a),
                       .wdata(tbl_wdata.fb_min),  .rdata(lut_rdata.fb_min));
  sram_sp u_sram_max  (.clk(ckm), .en(tbl_we | lut_rd), .we(tbl_we), .addr(lut_a),
                       .wdata(tbl_wdata.fb_max),  .rdata(lut_rdata.fb_max));
  sram_sp u_sram_step (.clk(ckm), .en(tbl_we | lut_rd), .we(tbl_we), .addr(lut_a),
                       .wdata(tbl_wdata.fb_step), .rdata(lut_rdata.fb_step));

  fmcw_direct_path u_dp (.ckm, .rst_n, .mod_en, .start_idx, .end_idx, .mb_last,
                         .n_half(n_half_ckm), .lut_rd, .lut_addr(lut_raddr), .lut_data(lut_rdata),
                         .cb(cb_mod), .mb(mb_mod), .fbm_int(fbm_int_fm), .fbm_frac(fbm_frac_fm),
                         .up(ramp_up), .switch_evt, .turn_evt, .running(mod_running));
  mod_comp_gen u_cg (.ckr, .rst_n, .mod_en, .step(comp_step), .n_half(n_half_ckr),
                     .comp(comp_fmcw), .up(comp_up));

  fsk_direct_path u_fsk (.ckr, .rst_n, .fsk_en, .data(fsk_data), .dev(fsk_dev),
                         .gain(fsk_gain_used), .comp(comp_fsk), .fbm_int(fbm_int_fsk),
                         .fbm_frac(fbm_frac_fsk));

  // fine-bank gain calibration; its result replaces the programmed FSK gain
  kdco_cal u_kc (.ckr, .rst_n, .start(kc_start), .log2n(kc_log2n), .settle(kc_settle),
                 .dev(kc_dev), .fb_word({fbl_int, fbl_frac}), .fcw_ofs(kc_ofs),
                 .busy(kc_busy), .done(kc_done), .gain(kc_gain), .gain_valid(kc_valid));
  assign fsk_gain_used = kc_valid ? kc_gain : fsk_gain;

  // mod_en multiplexer: the direct path takes over CB and MB while it runs
  assign cb_dco      = (mod_en && mod_running) ? cb_mod : cb_loop;
  assign mb_dco      = (mod_en && mod_running) ? mb_mod : mb_loop;
  assign fbm_int_dco = fsk_en ? fbm_int_fsk  : fbm_int_fm;
  assign fbm_frac    = fsk_en ? fbm_frac_fsk : fbm_frac_fm;

  mismatch_corrector u_mc (.frac_in(fbm_frac), .eps_mag, .eps_neg, .frac_out(fbm_frac_c));

  // ---------------- fine-bank decoding and dithering ----------------
  fb_loop_decoder u_fbl (.n(fbl_int), .fb_loop1, .fb_loop2);
  fb_mod_decoder  u_fbm (.k(fbm_int_dco), .fb_mod);
  sigma_delta #(.W(OTW_FRAC))   u_sd_loop (.clk(ckv64), .rst_n, .order2(sd_order2),
                                           .frac(fbl_frac), .dout(dith_loop));
  sigma_delta #(.W(FBM_FRAC_W)) u_sd_mod  (.clk(ckv64), .rst_n, .order2(1'b0),
                                           .frac(fbm_frac_c), .dout(dith_mod));

  logic unused;
  assign unused = ^rv_count;
endmodule
