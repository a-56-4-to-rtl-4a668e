`timescale 1ps/1fs
// tb_fb_mod_decoder: exhaustive test of the FB_Mod thermometer decoder.
// For every word 0..63 it checks that min(k, 38) cells are ON, that they are
// the top ones (cell 37 first), and that the centre word 19 turns on half
// the bank. Includes a watchdog.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_fb_mod_decoder;
  import adpll_pkg::*;
  localparam int N = FBM_BITS;
  int checks = 0, failures = 0;
  logic [FBM_INT_W-1:0] k;
  logic [N-1:0] fb_mod, e;

  fb_mod_decoder dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << FBM_INT_W); i++) begin
      k = FBM_INT_W'(i); #10;
      e = '0;
      for (int j = 0; j < N; j++) if (j < i) e[N - 1 - j] = 1'b1;
      checks++;
      if (fb_mod !== e) begin failures++; $display("FAIL: word %0d gives %b", i, fb_mod); end
    end
    k = FBM_INT_W'(N / 2); #10;
    checks++;
    if ($countones(fb_mod) != N / 2) begin failures++; $display("FAIL: centre word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
