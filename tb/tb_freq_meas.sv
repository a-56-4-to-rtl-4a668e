`timescale 1ps/1fs
// tb_freq_meas: self-checking test of the averaged frequency counter.
// Drives the variable phase as a ramp with a random per-cycle increment
// (a fixed FCW, plus bounded random jitter in every other run), wrapping at
// 2^32 so that the window spans several wraps, and checks that the measured
// mean equals the increment exactly without jitter and within the jitter
// bound with it, for windows of 2^2 .. 2^9 cycles, and that done follows
// the start by 2^L + 1 cycles. Watchdog included.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_freq_meas;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  logic ckr = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [3:0] log2n = 4'd4;
  logic [PH_W-1:0] phv = '0, freq;
  logic busy, done;
  logic [PH_W-1:0] inc;
  int cyc;

  freq_meas dut (.*);

  always #5000 ckr = ~ckr;
  bit jit;
  always @(posedge ckr) phv <= phv + inc + (jit ? PH_W'($urandom_range(0, 4000)) - PH_W'(2000) : '0);

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = PH_W'(int'(18.90625 * (1 << PH_FRAC)));
    #1000 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      log2n = 4'(2 + r);
      jit   = r[0];
      inc   = PH_W'($urandom_range(10 << PH_FRAC, 30 << PH_FRAC));
      repeat (3) @(negedge ckr);
      start = 1'b1;
      @(negedge ckr); start = 1'b0;
      cyc = 0;
      while (!done) begin @(negedge ckr); cyc++; end
      checks++;
      if (!jit && freq !== inc) begin
        failures++; $display("FAIL: L=%0d freq=%h expected %h", log2n, freq, inc);
      end
      checks++;
      if (cyc != (1 << log2n) + 1) begin failures++; $display("FAIL: L=%0d took %0d cycles", log2n, cyc); end
      checks++;
      if (freq > inc + PH_W'(2000) || freq < inc - PH_W'(2000)) begin
        failures++; $display("FAIL: mean %h far from the increment %h", freq, inc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
