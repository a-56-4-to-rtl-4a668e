`timescale 1ps/1fs
// tb_fmcw_direct_path: self-checking test of the CKM-rate FMCW direct path.
// The bench builds a linearization table for an ideal three-bank DCO law
// (367 MHz per CB step, 35 MHz per MB step with 11 MB codes per CB code,
// 1.64 MHz per FB_Mod cell), with switchovers in the middle of each
// neighbouring pair's FB_Mod overlap, and serves it with a one-cycle read
// latency like the SRAMs. It then runs triangular chirps and converts the
// CB/MB/FB_Mod outputs back to frequency every CKM cycle. Checks: the ramp
// starts at the start entry's FB_min; each cycle the frequency moves by one
// step (kmod/f_CKM) in the ramp direction, within the table's rounding; at
// a bank switchover it moves by no more than one step and never backwards
// (the comparator fires once the word has passed FB_max, so the switch
// lands on the exact crossover frequency); the direction reverses every half
// period; switchovers happen in both directions; and the path returns to
// idle when mod_en falls. Watchdog included.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_fmcw_direct_path;
  import adpll_pkg::*;
  localparam real K_CB = 367.0e6, K_MB = 35.0e6, K_FB = 1.64e6;
  int checks = 0, failures = 0, n_sw_up = 0, n_sw_dn = 0, n_turn = 0;
  logic ckm = 1'b0, rst_n = 1'b1, mod_en = 1'b0;
  logic [LUT_AW-1:0] start_idx, end_idx;
  logic [MB_W-1:0] mb_last = 4'd10;
  logic [23:0] n_half = 24'd600;
  logic lut_rd;
  logic [LUT_AW-1:0] lut_addr;
  lut_entry_t lut_data, tbl [1 << LUT_AW];
  logic [CB_W-1:0] cb;
  logic [MB_W-1:0] mb;
  logic [FBM_INT_W-1:0] fbm_int;
  logic [FBM_FRAC_W-1:0] fbm_frac;
  logic up, switch_evt, turn_evt, running;
  real step_hz, f, f_prev, fb_sw, tol;
  bit have_prev, turn_d;

  fmcw_direct_path dut (.*);

  always #1058 ckm = ~ckm;          // CKV/128 at 60.5 GHz
  always @(posedge ckm) if (lut_rd) lut_data <= tbl[lut_addr];

  function automatic real freq_of(logic [CB_W-1:0] c, logic [MB_W-1:0] m,
                                  logic [FBM_INT_W-1:0] i, logic [FBM_FRAC_W-1:0] fr);
    return K_CB * c + K_MB * m + K_FB * (real'(i) + real'(fr) / 1024.0);
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, m, c1, c0, m0;
    real dstep, lo, hi;
    for (int a = 0; a < (1 << LUT_AW); a++) tbl[a] = '0;
    c0 = 17; m0 = 9;
    start_idx = LUT_AW'({5'(c0), 4'(m0)});
    step_hz = 100.0e6 / 5.0e-6 / (60.5e9 / 128.0);        // 100 MHz in 5 us, Hz per CKM
    for (int k = 0; k < 8; k++) begin
      c  = c0 + (m0 + k) / 11;  m = (m0 + k) % 11;
      c1 = c0 + (m0 + k + 1) / 11;
      dstep = (c1 != c) ? (K_CB - 10.0 * K_MB) / K_FB : K_MB / K_FB;
      hi = 19.0 + dstep / 2.0;
      lo = (k == 0) ? 19.0 : fb_sw;
      fb_sw = hi - dstep;
      tbl[{5'(c), 4'(m)}].fb_min  = LUT_DW'(int'(lo * 1024.0));
      tbl[{5'(c), 4'(m)}].fb_max  = LUT_DW'(int'(hi * 1024.0));
      tbl[{5'(c), 4'(m)}].fb_step = LUT_DW'(int'(step_hz / K_FB * 65536.0));
      end_idx = LUT_AW'({5'(c), 4'(m)});
    end
    n_half = 24'(int'(80.0e6 / step_hz));                  // 80 MHz per half period
    tol = K_FB * 3.0 / 1024.0 + 0.02 * step_hz;
    #1000 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    @(negedge ckm); mod_en = 1'b1;
    wait (running);
    @(negedge ckm); @(negedge ckm);
    checks++;
    if ({cb, mb} != start_idx || fbm_int != 6'd19 || fbm_frac > 10'd100) begin
      failures++; $display("FAIL: ramp start at %0d/%0d FB %0d.%0d", cb, mb, fbm_int, fbm_frac);
    end
    have_prev = 0;
    for (int n = 0; n < 4 * int'(n_half); n++) begin
      @(negedge ckm);
      f = freq_of(cb, mb, fbm_int, fbm_frac);
      if (switch_evt && up) n_sw_up++;
      if (switch_evt && !up) n_sw_dn++;
      if (turn_evt) n_turn++;
      if (have_prev && !turn_evt && !turn_d) begin
        // at a switchover the comparator has overshot FB_max (FB_min) by up to
        // one step, so the step there may be anything between 0 and one step
        checks++;
        if ((f - f_prev) > step_hz + tol || (f - f_prev) < -step_hz - tol ||
            (!switch_evt && up && (f - f_prev) < step_hz - tol) ||
            (!switch_evt && !up && (f - f_prev) > -step_hz + tol) ||
            (switch_evt && up && (f - f_prev) < -tol) ||
            (switch_evt && !up && (f - f_prev) > tol)) begin
          failures++;
          $display("FAIL: cycle %0d up=%b step %0.3f MHz (expected %0.3f) at %0d/%0d FB %0d.%0d",
                   n, up, (f - f_prev) / 1e6, step_hz / 1e6, cb, mb, fbm_int, fbm_frac);
        end
      end
      f_prev = f; have_prev = 1; turn_d = turn_evt;
    end
    checks++;
    if (n_sw_up < 2 || n_sw_dn < 2 || n_turn < 3) begin
      failures++; $display("FAIL: switchovers up %0d down %0d, turns %0d", n_sw_up, n_sw_dn, n_turn);
    end
    @(negedge ckm); mod_en = 1'b0;
    repeat (3) @(negedge ckm);
    checks++;
    if (running || fbm_int != 6'd19) begin failures++; $display("FAIL: did not return to idle"); end
    $display("switchovers up %0d down %0d, turns %0d", n_sw_up, n_sw_dn, n_turn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
