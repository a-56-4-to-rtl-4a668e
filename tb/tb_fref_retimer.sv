`timescale 1ps/1fs
// tb_fref_retimer: self-checking test of the FREF retimer.
// CKV/32 runs at 1.89 GHz (CKV/128 derived from it in the bench) and FREF
// at 100 MHz, a non-integer ratio, so the FREF edge walks across the CKV/32
// period. The edge select is set as the phase detector would set it: to the
// falling-edge path when the FREF edge lies in the outer quarters of the
// CKV/32 period. Checks: exactly one capture pulse and one CKR rising edge
// per FREF rising edge; the capture pulse follows the FREF edge by one to
// three CKV/32 periods; every CKR edge coincides with a CKV/128 rising edge.
// Includes a watchdog.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_fref_retimer;
  int checks = 0, failures = 0;
  localparam real T32 = 1.0e12 / (60.5e9 / 32.0);
  logic ckv32 = 1'b0, ckv128 = 1'b0, rst_n = 1'b1, fref = 1'b0, sel_edge = 1'b0;
  logic capture, ckr;
  real t_fref, t_last32, t_last128;
  int n_fref = 0, n_cap = 0, n_ckr = 0, d2 = 0;

  fref_retimer dut (.*);

  initial forever begin #(T32 / 2.0); ckv32 = ~ckv32; end
  always @(posedge ckv32) begin
    d2++;
    if (d2 % 2 == 0) ckv128 = ~ckv128;
    t_last32 = $realtime;
  end
  always @(posedge ckv128) t_last128 = $realtime;
  initial begin
    #3000;
    forever begin
      #(5000.0);
      fref = ~fref;
    end
  end

  always @(posedge fref) begin
    real ph;
    n_fref++;
    t_fref = $realtime;
    ph = ($realtime - t_last32) / T32;
    sel_edge = (ph < 0.25) || (ph >= 0.75);
  end
  always @(posedge ckv32) if (capture) begin
    n_cap++;
    checks++;
    if ($realtime - t_fref < 1.0 * T32 - 1.0 || $realtime - t_fref > 3.0 * T32 + 1.0) begin
      failures++; $display("FAIL: capture %0.1f ps after the FREF edge", $realtime - t_fref);
    end
  end
  always @(posedge ckr) begin
    n_ckr++;
    checks++;
    if ($realtime != t_last128) begin failures++; $display("FAIL: CKR edge not on a CKV/128 edge"); end
  end

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    wait (n_fref == 500);
    #(5000.0);
    checks++;
    if (n_cap != n_fref || (n_ckr != n_fref && n_ckr != n_fref - 1)) begin
      failures++; $display("FAIL: %0d FREF edges, %0d captures, %0d CKR edges", n_fref, n_cap, n_ckr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
