`timescale 1ps/1fs
// tb_fsk_direct_path: self-checking test of the FSK two-point path.
// For random deviations and gains it checks, one CKR cycle after each data
// change, that the compensation word is +/- the deviation and that the
// FB_Mod word is the bank centre (19) plus/minus deviation * gain, split into
// integer and 10-bit fraction and floored at zero, and that with the path
// disabled it returns to the centre and a zero compensation. Watchdog
// included.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_fsk_direct_path;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  logic ckr = 1'b0, rst_n = 1'b1, fsk_en = 1'b0, data = 1'b0;
  logic [FCW_W-1:0] dev = '0;
  logic [15:0] gain = '0;
  logic signed [FCW_W-1:0] comp;
  logic [FBM_INT_W-1:0] fbm_int;
  logic [FBM_FRAC_W-1:0] fbm_frac;
  real w;
  longint wi;

  fsk_direct_path dut (.*);

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
    for (int i = 0; i < 500; i++) begin
      @(negedge ckr);
      fsk_en = (i % 50 != 49);
      data   = $urandom_range(0, 1);
      dev    = FCW_W'($urandom_range(0, 12000));            // up to ~37 MHz at 100 MHz ref
      gain   = 16'($urandom_range(1000, 3000));             // about 2^? LSB per FCW, Q12.4
      @(negedge ckr);
      if (fsk_en) begin
        // FB_Mod word in units of 2^-(PH_FRAC+4) cells
        wi = (longint'(FBM_BITS / 2) << (PH_FRAC + 4)) + (data ? 1 : -1) * longint'(dev) * longint'(gain);
        if (wi < 0) wi = 0;
        checks++;
        if (comp != (data ? FCW_W'(dev) : -FCW_W'(dev)) ||
            fbm_int != FBM_INT_W'(wi >> (PH_FRAC + 4)) ||
            fbm_frac != FBM_FRAC_W'(wi >> (PH_FRAC + 4 - FBM_FRAC_W))) begin
          failures++;
          $display("FAIL: data=%b dev=%0d gain=%0d: comp=%0d fbm=%0d.%0d", data, dev, gain, comp, fbm_int, fbm_frac);
        end
      end else begin
        checks++;
        if (comp != 0 || fbm_int != FBM_INT_W'(FBM_BITS / 2) || fbm_frac != 0) begin
          failures++; $display("FAIL: disabled path not at the centre");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
