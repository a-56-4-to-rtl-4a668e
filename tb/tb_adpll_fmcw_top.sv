`timescale 1ps/1fs
// tb_adpll_fmcw_top: end-to-end test of the ADPLL FMCW transmitter at its
// default parameters.
//
// 1. Power-up: TDC gain calibration, then bank acquisition CB -> MB ->
//    type-I tracking -> type-II tracking on a 60.5 GHz channel (FCW =
//    60.5e9 / 32 / 100e6). Checks: each mode is reached, 1/K_TDC matches the
//    CKV/32 period in delays, the averaged DCO frequency and the averaged
//    frequency counter both match the channel.
// 2. One FREF edge is displaced by 0.6 CKV/32 periods: the glitch remover
//    must freeze the phase error, and the loop must stay locked.
// 3. A triangular chirp (up and down, several MB switchovers and one CB
//    switchover) is run from a table whose switchover words follow from the
//    DCO step sizes and whose steps the table-entry calculator computes
//    from them (FB_step = dFB / dn): checks
//    bank-switchover and turn-around events, that the loop's own FB_Loop word
//    barely moves (the direct path does the modulation), that the phase error
//    stays small, and that the peak frequency matches the programmed BW.
// 4. Fine-bank gain calibration by +/-5 MHz reference steps: the measured
//    FSK gain must match 32 f_R / K_FB of the DCO model.
// 5. FSK two-point modulation with only the calibrated gain (the programmed
//    one is zero): the frequency follows +/- the deviation.
// Expected values come from the stimulus and the DCO step sizes, not from the
// design's internal state.
module tb_adpll_fmcw_top;
  import adpll_pkg::*;

  localparam real F_REF  = 100.0e6;
  localparam real T_REF  = 1.0e12 / F_REF;     // ps
  localparam real F_CH   = 60.5e9;
  localparam real K_FB   = 1.64e6;
  localparam real K_MB   = 35.0e6;
  localparam real K_CB   = 367.0e6;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- DUT ----------------
  logic rst_n = 1'b1, fref = 1'b0, dco_en = 1'b0;
  logic [FCW_W-1:0] fcw;
  logic acq_start = 1'b0;
  logic [3:0] lambda_sh [4];
  logic tdc_cal_start = 1'b0, fm_start = 1'b0;
  logic mod_en = 1'b0, lut_we = 1'b0, fsk_en = 1'b0, fsk_data = 1'b0;
  logic [LUT_AW-1:0] start_idx = '0, end_idx = '0, lut_waddr = '0;
  lut_entry_t lut_wdata = '0;
  logic cal_valid = 1'b0, cal_ready;
  logic [LUT_AW-1:0] cal_idx = '0;
  logic [LUT_DW-1:0] cal_fb_min = '0, cal_fb_max = '0;
  logic [23:0] cal_dn = '0;
  logic kc_start = 1'b0, kc_busy, kc_done;
  logic [15:0] kc_gain;
  logic [23:0] n_half_ckm = 24'd1, n_half_ckr = 24'd1;
  logic [31:0] comp_step = '0;
  logic [FCW_W-1:0] fsk_dev = '0;
  logic [15:0] fsk_gain = '0;

  logic ckv, ckv32, ckr, ckm, glitch, clk_quality_bad, switch_evt, turn_evt, ramp_up;
  logic tdc_cal_done, fm_done, tdc_cal_busy, fm_busy, comp_up;
  real  dco_freq_hz;
  loop_mode_e mode;
  logic signed [PH_W-1:0] phe;
  logic [CB_W-1:0] cb_dco;
  logic [MB_W-1:0] mb_dco;
  logic signed [7:0] fbl_int;
  logic [FBM_INT_W-1:0] fbm_int_dco;
  logic [INVK_W-1:0] inv_ktdc;
  logic [PH_W-1:0] fm_freq;

  adpll_fmcw_top dut (
    .rst_n, .fref, .dco_en, .fcw, .acq_start,
    .cb_cycles(16'd40), .mb_cycles(16'd60), .trk1_cycles(16'd150),
    .alpha_cb(5'd6), .alpha_mb(5'd4), .alpha_trk1(5'd4), .alpha_trk2(5'd6),
    .rho_sh(5'd12), .lambda_sh, .norm(16'd3200), .cb_init(5'd16), .mb_init(4'd8),
    .qm_threshold(PH_W'(1) << (PH_FRAC - 3)), .sd_order2(1'b1),
    .tdc_cal_start, .tdc_cal_log2n(4'd6), .fm_start, .fm_log2n(4'd6),
    .mod_en, .sel_mod(2'b00), .start_idx, .end_idx, .mb_last(4'd10),
    .n_half_ckm, .comp_step, .n_half_ckr, .eps_mag(8'd0), .eps_neg(1'b0),
    .lut_we, .lut_waddr, .lut_wdata,
    .cal_valid, .cal_idx, .cal_fb_min, .cal_fb_max, .cal_dn, .cal_ready,
    .kc_start, .kc_log2n(4'd8), .kc_settle(16'd1500),
    .kc_dev(16'(int'(5.0e6 / 32.0 / F_REF * real'(1 << PH_FRAC)))), .kc_busy, .kc_done, .kc_gain,
    .fsk_en, .fsk_data, .fsk_dev, .fsk_gain,
    .ckv, .ckv32, .ckr, .ckm, .dco_freq_hz, .mode, .phe, .glitch, .clk_quality_bad,
    .cb_dco, .mb_dco, .fbl_int, .fbm_int_dco, .switch_evt, .turn_evt, .ramp_up,
    .inv_ktdc, .tdc_cal_busy, .tdc_cal_done, .fm_freq, .fm_busy, .fm_done, .comp_up
  );

  // ---------------- reference clock with one optional displaced edge ----------------
  // Edges sit on an absolute grid k*T_REF/2; fref_shift delays only the next rising edge.
  real fref_shift = 0.0;
  initial begin
    longint k = 0;
    real    t_edge;
    forever begin
      k++;
      t_edge = real'(k) * T_REF / 2.0 + ((k % 2 == 1) ? fref_shift : 0.0);
      #(t_edge - $realtime);
      fref = ~fref;
      if (k % 2 == 1) fref_shift = 0.0;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_cb = 0, n_mb = 0, n_trk1 = 0, n_trk2 = 0, n_glitch = 0, n_sw = 0, n_turn = 0;
  int n_fsk = 0, n_ckr = 0, n_cal = 0, n_kc = 0;
  real g_exp;
  always @(posedge ckr) begin
    n_ckr++;
    case (mode)
      M_CB:   n_cb++;
      M_MB:   n_mb++;
      M_TRK1: n_trk1++;
      M_TRK2: n_trk2++;
      default: ;
    endcase
    if (glitch) n_glitch++;
  end
  always @(posedge ckm) begin
    if (switch_evt) n_sw++;
    if (turn_evt)   n_turn++;
  end

  task automatic wait_ckr(int n);
    repeat (n) @(posedge ckr);
  endtask

  // mean DCO frequency over about n reference cycles, from the CKV/32 edge count
  int  n_ckv32 = 0;
  real t_ckv32 = 0.0;
  always @(posedge ckv32) begin n_ckv32++; t_ckv32 = $realtime; end
  task automatic mean_freq(int n, output real f);
    int  n0;
    real t0;
    @(posedge ckv32); n0 = n_ckv32; t0 = t_ckv32;
    #(real'(n) * T_REF);
    @(posedge ckv32);
    f = 32.0 * real'(n_ckv32 - n0) / ((t_ckv32 - t0) * 1.0e-12);
  endtask

  real abs_r;
  function automatic real absr(real x); return x < 0.0 ? -x : x; endfunction
  function automatic real phe_r(logic signed [PH_W-1:0] p); return real'(p) / real'(1 << PH_FRAC); endfunction

  // ---------------- watchdog ----------------
  initial begin
    #(T_REF * 12000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  real f_mean, f_exp, kmod, fckm, t_half, bw, fcw_r, fb_sw, max_phe, f_peak, phe_lock;
  int  fbl_lock, fbl_dev_max, c0, m0;
  initial begin
    foreach (lambda_sh[i]) lambda_sh[i] = 4'd3;
    fcw_r = F_CH / 32.0 / F_REF;
    fcw   = FCW_W'(longint'(fcw_r * real'(1 << PH_FRAC)));
    #(1000.0);
    rst_n = 1'b0;
    #(19000.0);
    dco_en = 1'b1;
    #(20000.0);
    rst_n = 1'b1;
    wait_ckr(8);

    // ---- TDC gain calibration ----
    @(negedge ckr) tdc_cal_start = 1'b1;
    @(negedge ckr) tdc_cal_start = 1'b0;
    wait (tdc_cal_done);
    begin
      real tv_delays, inv_exp;
      tv_delays = 1.0e12 / (dco_freq_hz / 32.0) / 12.2;
      inv_exp   = real'(1 << PH_FRAC) / tv_delays;
      check(absr(real'(inv_ktdc) - inv_exp) < 0.03 * inv_exp,
            $sformatf("1/K_TDC %0d, expected about %0.0f", inv_ktdc, inv_exp));
    end

    // ---- acquisition and lock ----
    @(negedge ckr) acq_start = 1'b1;
    @(negedge ckr) acq_start = 1'b0;
    wait (mode == M_TRK2);
    wait_ckr(400);
    mean_freq(256, f_mean);
    phe_lock = phe_r(phe);
    $display("locked: CB=%0d MB=%0d FB_Loop=%0d f=%0.4f GHz", cb_dco, mb_dco, fbl_int, f_mean / 1e9);
    check(absr(f_mean - F_CH) < 0.5e6, $sformatf("locked frequency %0.6f GHz", f_mean / 1e9));
    begin
      real pmax = 0.0;
      repeat (64) begin
        @(posedge ckr);
        if (absr(phe_r(phe) - phe_lock) > pmax) pmax = absr(phe_r(phe) - phe_lock);
      end
      check(pmax < 0.1, $sformatf("phase error wander after lock %f", pmax));
    end

    @(negedge ckr) fm_start = 1'b1;
    @(negedge ckr) fm_start = 1'b0;
    wait (fm_done);
    @(negedge ckr);
    check(absr(real'(fm_freq) / real'(1 << PH_FRAC) - fcw_r) < 8.0e-4,
          $sformatf("frequency counter %f, FCW %f", real'(fm_freq) / real'(1 << PH_FRAC), fcw_r));

    // ---- glitch injection: one FREF edge late by 0.6 CKV/32 period ----
    begin
      int g0;
      g0 = n_glitch;
      @(posedge fref);
      fref_shift = 0.6 * 1.0e12 / (F_CH / 32.0);
      wait_ckr(6);
      check(n_glitch > g0, "displaced FREF edge not removed as a glitch");
      wait_ckr(60);
      mean_freq(32, f_mean);
      check(absr(f_mean - F_CH) < 0.5e6, $sformatf("frequency after glitch %0.6f GHz", f_mean / 1e9));
    end

    // ---- FMCW chirp ----
    c0 = int'(cb_dco); m0 = int'(mb_dco);
    fckm   = F_CH / 128.0;
    t_half = 6.0e-6;                          // half period, s
    bw     = 90.0e6;                          // modulation range, Hz
    kmod   = bw / t_half;                     // Hz/s
    n_half_ckr = 24'(int'(t_half * F_REF));
    n_half_ckm = 24'(int'(t_half * fckm));
    comp_step  = 32'(longint'(kmod / F_REF / 32.0 / F_REF * real'(longint'(1) << (PH_FRAC + COMP_XF))));
    start_idx  = LUT_AW'({c0[CB_W-1:0], m0[MB_W-1:0]});
    // table: switchover in the middle of the FB_Mod overlap; start entry at the bank centre
    for (int k = 0; k < 8; k++) begin
      int c, m, c1;
      real dstep, fb_lo_this, fb_hi_this;
      c  = c0 + (m0 + k) / 11;
      m  = (m0 + k) % 11;
      c1 = c0 + (m0 + k + 1) / 11;
      dstep = (c1 != c) ? (K_CB - 10.0 * K_MB) / K_FB : K_MB / K_FB;
      // entry k: lower switchover was set by entry k-1, upper one here
      fb_hi_this = 19.0 + dstep / 2.0;
      if (k == 0) fb_lo_this = 19.0;
      else        fb_lo_this = fb_sw;
      fb_sw = fb_hi_this - dstep;             // FB_min of the next entry
      // entry k goes through the table-entry calculator: FB_step = dFB / dn
      @(negedge ckm);
      while (!cal_ready) @(negedge ckm);
      cal_valid  = 1'b1;
      cal_idx    = LUT_AW'({c[CB_W-1:0], m[MB_W-1:0]});
      cal_fb_min = LUT_DW'(int'(fb_lo_this * 1024.0));
      cal_fb_max = LUT_DW'(int'(fb_hi_this * 1024.0));
      cal_dn     = 24'(int'((fb_hi_this - fb_lo_this) * K_FB / (kmod / fckm) + 0.5));
      end_idx    = cal_idx;
      @(negedge ckm) cal_valid = 1'b0;
      n_cal++;
    end
    @(negedge ckm);
    while (!cal_ready) @(negedge ckm);
    repeat (4) @(negedge ckm);
    fbl_lock = int'(fbl_int);
    fbl_dev_max = 0; max_phe = 0.0; f_peak = 0.0;
    mod_en = 1'b1;
    repeat (int'(2.0 * t_half * F_REF) + 20) begin
      @(posedge ckr);
      if (absr(phe_r(phe) - phe_lock) > max_phe) max_phe = absr(phe_r(phe) - phe_lock);
      if ((int'(fbl_int) - fbl_lock) > fbl_dev_max)  fbl_dev_max = int'(fbl_int) - fbl_lock;
      if ((fbl_lock - int'(fbl_int)) > fbl_dev_max)  fbl_dev_max = fbl_lock - int'(fbl_int);
      if (dco_freq_hz > f_peak) f_peak = dco_freq_hz;
    end
    mod_en = 1'b0;
    $display("chirp: switchovers=%0d turns=%0d max|phe|=%f FB_Loop dev=%0d peak=%0.4f GHz",
             n_sw, n_turn, max_phe, fbl_dev_max, f_peak / 1e9);
    check(n_sw >= 4, "too few bank switchovers");
    check(n_turn >= 1, "no ramp turn-around");
    check(max_phe < 0.5, $sformatf("phase error during chirp %f", max_phe));
    check(fbl_dev_max <= 4, $sformatf("FB_Loop moved by %0d during chirp", fbl_dev_max));
    check(absr(f_peak - (F_CH + bw)) < 8.0e6, $sformatf("chirp peak %0.4f GHz", f_peak / 1e9));

    // ---- fine-bank gain calibration (+/-5 MHz reference steps) ----
    wait_ckr(100);
    @(negedge ckr) kc_start = 1'b1;
    @(negedge ckr) kc_start = 1'b0;
    while (kc_busy) @(posedge ckr);
    g_exp = 32.0 * F_REF / K_FB * 16.0;
    $display("K_DCO calibration: gain %0d expected %0.1f", kc_gain, g_exp);
    check(absr(real'(kc_gain) - g_exp) < 0.03 * g_exp, $sformatf("calibrated FSK gain %0d", kc_gain));
    if (absr(real'(kc_gain) - g_exp) < 0.03 * g_exp) n_kc++;
    wait_ckr(300);

    // ---- FSK two-point modulation, with the calibrated gain only ----
    fsk_dev  = FCW_W'(longint'(20.0e6 / 32.0 / F_REF * real'(1 << PH_FRAC)));
    fsk_gain = 16'd0;                         // overridden by the calibration
    fsk_data = 1'b1;
    fsk_en   = 1'b1;
    wait_ckr(40);
    mean_freq(128, f_mean);
    check(absr(f_mean - (F_CH + 20.0e6)) < 1.0e6, $sformatf("FSK high %0.4f GHz", f_mean / 1e9));
    if (absr(f_mean - (F_CH + 20.0e6)) < 1.0e6) n_fsk++;
    fsk_data = 1'b0;
    wait_ckr(40);
    mean_freq(128, f_mean);
    check(absr(f_mean - (F_CH - 20.0e6)) < 1.0e6, $sformatf("FSK low %0.4f GHz", f_mean / 1e9));
    if (absr(f_mean - (F_CH - 20.0e6)) < 1.0e6) n_fsk++;
    fsk_en = 1'b0;

    // ---- every mechanism must have happened ----
    check(n_cb > 0,    "CB acquisition never ran");
    check(n_mb > 0,    "MB acquisition never ran");
    check(n_trk1 > 0,  "type-I tracking never ran");
    check(n_trk2 > 0,  "type-II tracking never ran");
    check(n_glitch > 0, "glitch removal never happened");
    check(n_sw > 0,    "bank switchover never happened");
    check(n_turn > 0,  "ramp turn-around never happened");
    check(n_fsk == 2,  "FSK did not reach both tones");
    check(n_cal == 8,  "table entries not written through the calculator");
    check(n_kc == 1,   "fine-bank gain calibration did not succeed");
    $display("mechanisms: CB=%0d MB=%0d TRK1=%0d TRK2=%0d glitch=%0d switch=%0d turn=%0d fsk=%0d cal=%0d kdco=%0d",
             n_cb, n_mb, n_trk1, n_trk2, n_glitch, n_sw, n_turn, n_fsk, n_cal, n_kc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
