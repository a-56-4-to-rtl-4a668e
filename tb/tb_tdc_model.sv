`timescale 1ps/1fs
// tb_tdc_model: check of the behavioural TDC model. With CKV/32 at 529 ps and
// FREF edges at random instants it checks that the delay code is the time
// since the last CKV/32 rising edge divided by the 12.2 ps stage delay
// (floored, clipped at 63) and that the period code is the CKV/32 period in
// stages (43). Watchdog included.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_tdc_model;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  logic fref = 1'b0, ckv32 = 1'b0;
  logic [TDC_W-1:0] tdc_code, period_code;
  real t_r;
  int e;

  tdc_model dut (.*);

  initial forever begin #264.5; ckv32 = ~ckv32; end
  always @(posedge ckv32) t_r = $realtime;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000;
    for (int i = 0; i < 300; i++) begin
      #($urandom_range(2000, 4000) + real'($urandom_range(0, 999)) / 1000.0);
      fref = 1'b1;
      e = int'($floor(($realtime - t_r) / 12.2));
      if (e > 63) e = 63;
      #1;
      checks++;
      if (int'(tdc_code) != e || period_code != 6'(int'($floor(529.0 / 12.2)))) begin
        failures++; $display("FAIL: code %0d period %0d expected %0d", tdc_code, period_code, e);
      end
      #100 fref = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
