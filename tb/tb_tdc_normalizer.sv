`timescale 1ps/1fs
// tb_tdc_normalizer: self-checking test of the TDC normaliser.
// Applies random 6-bit TDC codes and 1/K_TDC gains and checks the fractional
// phase epsilon = code * (1/K_TDC), saturated just below one CKV/32 period,
// and the edge-select flag (set in the outer quarters of the period where
// the rising-edge retiming would be marginal). Purely combinational; a
// watchdog bounds the run.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_tdc_normalizer;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  logic [TDC_W-1:0] tdc_code;
  logic [INVK_W-1:0] inv_ktdc;
  logic [PH_FRAC-1:0] eps;
  logic sel_edge;
  longint p, e_m;
  bit s_m;

  tdc_normalizer dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      tdc_code = TDC_W'($urandom);
      inv_ktdc = (i < 2000) ? INVK_W'($urandom_range(18000, 26000)) : INVK_W'($urandom);
      #10;
      p   = longint'(tdc_code) * longint'(inv_ktdc);
      e_m = (p >= (longint'(1) << PH_FRAC)) ? (longint'(1) << PH_FRAC) - 1 : p;
      s_m = (real'(e_m) < 0.25 * (1 << PH_FRAC)) || (real'(e_m) >= 0.75 * (1 << PH_FRAC));
      checks++;
      if (longint'(eps) != e_m || sel_edge != s_m) begin
        failures++;
        $display("FAIL: code %0d gain %0d: eps %0d sel %b, expected %0d %b",
                 tdc_code, inv_ktdc, eps, sel_edge, e_m, s_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
