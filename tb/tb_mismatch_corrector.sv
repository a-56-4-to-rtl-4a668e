`timescale 1ps/1fs
// tb_mismatch_corrector: exhaustive-over-fraction test of the dither-cell
// mismatch corrector. For every 10-bit fraction and random mismatch words
// of both signs it checks frac_out = frac +/- floor(frac * |eps| / 2^10),
// clipped to 0..1023, i.e. the fraction scaled by (1 + eps) with eps in
// units of 2^-10. Combinational; a watchdog bounds the run.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_mismatch_corrector;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  logic [FBM_FRAC_W-1:0] frac_in, frac_out;
  logic [EPS_W-1:0] eps_mag;
  logic eps_neg;
  int e;

  mismatch_corrector dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < (1 << FBM_FRAC_W); f++) begin
      for (int r = 0; r < 4; r++) begin
        frac_in = FBM_FRAC_W'(f);
        eps_mag = (r == 0) ? '0 : EPS_W'($urandom);
        eps_neg = r[0];
        #10;
        e = eps_neg ? f - (f * int'(eps_mag)) / 1024 : f + (f * int'(eps_mag)) / 1024;
        if (e > 1023) e = 1023;
        if (e < 0) e = 0;
        checks++;
        if (int'(frac_out) != e) begin
          failures++; $display("FAIL: frac %0d eps %s%0d gives %0d, expected %0d", f, eps_neg ? "-" : "+", eps_mag, frac_out, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
