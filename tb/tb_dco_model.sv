`timescale 1ps/1fs
// tb_dco_model: check of the behavioural 60 GHz DCO model. For random bank
// settings it compares the frequency monitor with the tuning law
// f = 53.9 GHz + 367 MHz*CB + 35 MHz*MB + 1.64 MHz*(ON fine cells + dither)
// and measures the generated clock by timing 2000 periods of CKV, which must
// agree with the monitor within 0.01 %. It also checks that the output stays
// low while disabled. Watchdog included.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_dco_model;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  logic en = 1'b0;
  logic [CB_W-1:0] cb = '0;
  logic [MB_W-1:0] mb = '0;
  logic [FBL_BITS-1:0] fb_loop1 = '0, fb_loop2 = '0;
  logic [FBM_BITS-1:0] fb_mod = '0;
  logic signed [2:0] dith_loop = '0, dith_mod = '0;
  logic ckv;
  real freq_hz, f_law, t0, f_meas;
  int n_on;

  dco_model dut (.*);

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    checks++;
    if (ckv !== 1'b0) begin failures++; $display("FAIL: disabled DCO toggles"); end
    en = 1'b1;
    for (int i = 0; i < 20; i++) begin
      cb = CB_W'($urandom); mb = MB_W'($urandom_range(0, 10));
      fb_loop1 = FBL_BITS'($urandom); fb_loop2 = FBL_BITS'($urandom);
      fb_mod = FBM_BITS'({$urandom, $urandom});
      dith_loop = 3'sd0; dith_mod = 3'sd0;
      #1;
      n_on = $countones(fb_loop1) + $countones(fb_loop2) + $countones(fb_mod);
      f_law = 53.9e9 + 367.0e6 * cb + 35.0e6 * mb + 1.64e6 * n_on;
      checks++;
      if (freq_hz > f_law + 1.0 || freq_hz < f_law - 1.0) begin
        failures++; $display("FAIL: monitor %0.0f Hz, law %0.0f Hz", freq_hz, f_law);
      end
      repeat (3) @(posedge ckv);
      t0 = $realtime;
      repeat (2000) @(posedge ckv);
      f_meas = 2000.0 / (($realtime - t0) * 1.0e-12);
      checks++;
      if (f_meas > f_law * 1.0001 || f_meas < f_law * 0.9999) begin
        failures++; $display("FAIL: measured %0.0f Hz, law %0.0f Hz", f_meas, f_law);
      end
    end
    dith_loop = 3'sd2; dith_mod = -3'sd1;
    #1;
    checks++;
    if (freq_hz > f_law + 1.64e6 + 1.0 || freq_hz < f_law + 1.64e6 - 1.0) begin
      failures++; $display("FAIL: dither cells not counted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
