`timescale 1ps/1fs
// tb_ref_phase_accum: self-checking test of the reference phase accumulator.
// Drives random channel FCWs and signed compensation words for a few hundred
// CKR cycles, with random enable gaps and synchronous clears, and compares Rr
// after every edge with a model that adds FCW + comp modulo 2^32. A watchdog
// ends the run if the stimulus stalls.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_ref_phase_accum;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  logic ckr = 1'b0, rst_n = 1'b1, clr = 1'b0, en = 1'b0;
  logic [FCW_W-1:0] fcw = '0;
  logic signed [FCW_W-1:0] comp = '0;
  logic [PH_W-1:0] rr, model;

  ref_phase_accum dut (.*);

  always #5000 ckr = ~ckr;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    model = '0;
    @(negedge ckr);
    checks++; if (rr !== '0) begin failures++; $display("FAIL: reset value %h", rr); end
    for (int i = 0; i < 400; i++) begin
      @(negedge ckr);
      fcw  = FCW_W'($urandom);
      comp = FCW_W'($urandom_range(0, 3) == 0 ? 0 : $urandom) >>> 6;
      en   = ($urandom_range(0, 7) != 0);
      clr  = ($urandom_range(0, 63) == 0);
      @(posedge ckr);
      if (clr)     model = '0;
      else if (en) model = model + PH_W'(fcw) + PH_W'(comp);
      #1;
      checks++;
      if (rr !== model) begin
        failures++;
        $display("FAIL: cycle %0d rr=%h expected %h", i, rr, model);
      end
    end
    // fixed case: 60.5 GHz channel at 100 MHz, FCW 18.90625 -> 64 cycles = 1210 exactly
    @(negedge ckr); clr = 1'b1; en = 1'b1; comp = '0;
    fcw = FCW_W'(int'(18.90625 * (1 << PH_FRAC)));
    @(negedge ckr); clr = 1'b0;
    repeat (64) @(negedge ckr);
    checks++;
    if (rr !== PH_W'(1210) << PH_FRAC) begin
      failures++; $display("FAIL: 64 cycles of FCW 18.90625 gave %h", rr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
