`timescale 1ps/1fs
// tb_tdc_gain_cal: self-checking test of the TDC gain calibration.
// Feeds per-cycle CKV/32 period readings that jitter by one delay around a
// random mean (40..46 delays), runs the calibration for 2^4 and 2^6
// readings, and checks the resulting 1/K_TDC against 2^20 * 2^L / (sum of
// the readings), to the exact integer quotient, and that the value before
// the first calibration is the programmed default. Watchdog included.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_tdc_gain_cal;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  logic ckr = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [3:0] log2n = 4'd4;
  logic [TDC_W-1:0] period_code = 6'd43;
  logic busy, done;
  logic [INVK_W-1:0] inv_ktdc;
  int sum, cnt, mean;
  bit acc_on;

  tdc_gain_cal dut (.*);

  always #5000 ckr = ~ckr;

  // stimulus and independent sum of the readings the block takes
  always @(posedge ckr) begin
    if (acc_on && cnt < (1 << log2n)) begin sum += int'(period_code); cnt++; end
    period_code <= TDC_W'(mean + $urandom_range(0, 2) - 1);
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_on = 0; mean = 43;
    #1000 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    @(negedge ckr);
    checks++;
    if (inv_ktdc != INVK_W'(24000)) begin failures++; $display("FAIL: default %0d", inv_ktdc); end
    for (int r = 0; r < 6; r++) begin
      mean  = $urandom_range(40, 46);
      log2n = (r % 2) ? 4'd6 : 4'd4;
      repeat (2) @(negedge ckr);
      start = 1'b1; sum = 0; cnt = 0;
      @(negedge ckr); start = 1'b0; acc_on = 1;
      wait (done); @(negedge ckr); acc_on = 0;
      checks++;
      if (int'(inv_ktdc) != ((1 << (PH_FRAC + int'(log2n))) / sum)) begin
        failures++; $display("FAIL: L=%0d sum=%0d gave %0d expected %0d", log2n, sum, inv_ktdc, (1 << (20 + int'(log2n))) / sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
