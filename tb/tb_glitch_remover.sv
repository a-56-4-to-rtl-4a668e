`timescale 1ps/1fs
// tb_glitch_remover: self-checking test of the phase-error glitch remover.
// Feeds a slowly wandering phase error with random jumps of up to +/-1.2
// CKV/32 periods, with tracking on and off, and checks every cycle against a
// model: a sample whose difference from the previous raw sample exceeds one
// half is replaced by the last output while tracking; the quality flag is
// raised whenever the difference exceeds the programmed threshold. Counts
// the glitches seen so that a run without any fails. Includes a watchdog.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_glitch_remover;
  import adpll_pkg::*;
  int checks = 0, failures = 0, n_frz = 0, n_bad = 0;
  logic ckr = 1'b0, rst_n = 1'b1, track_on = 1'b0;
  logic signed [PH_W-1:0] phe_in = '0, phe_out;
  logic [PH_W-1:0] qm_threshold = PH_W'(1) << (PH_FRAC - 3);
  logic phe_freeze, clk_quality_bad;
  longint prev, outm, d;
  bit frz_m, bad_m;

  glitch_remover dut (.*);

  always #5000 ckr = ~ckr;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    prev = 0; outm = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge ckr);
      if (i % 250 == 0) track_on = (i % 500 == 0) ? 1'b1 : $urandom_range(0, 1);
      if ($urandom_range(0, 15) == 0)
        phe_in = phe_in + PH_W'($signed($urandom_range(0, 2516582)) - 1258291);  // +/-1.2
      else
        phe_in = phe_in + PH_W'($signed($urandom_range(0, 20000)) - 10000);
      #1;
      d     = longint'(phe_in) - prev;
      frz_m = track_on && (d > (1 << (PH_FRAC - 1)) || d < -(1 << (PH_FRAC - 1)));
      bad_m = (d > longint'(qm_threshold)) || (d < -longint'(qm_threshold));
      checks++;
      if (phe_freeze != frz_m || clk_quality_bad != bad_m) begin
        failures++; $display("FAIL: cycle %0d freeze=%b bad=%b expected %b %b", i, phe_freeze, clk_quality_bad, frz_m, bad_m);
      end
      n_frz += frz_m; n_bad += bad_m;
      @(posedge ckr);
      if (!frz_m) outm = phe_in;
      prev = phe_in;
      #1;
      checks++;
      if (longint'(phe_out) != outm) begin
        failures++; $display("FAIL: cycle %0d output %0d expected %0d", i, phe_out, outm);
      end
    end
    checks++;
    if (n_frz == 0 || n_bad == 0) begin failures++; $display("FAIL: no glitch was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
