`timescale 1ps/1fs
// tb_fb_loop_decoder: exhaustive test of the FB_Loop sub-bank decoder.
// For every loop word from -22 to +22 it checks that the number of ON cells
// over both sub-banks is 22 + n, that word 0 turns on exactly the lower half
// of each bank, and that each step of the word turns exactly one cell on or
// off, in the order: Loop1 upper half upward, then Loop2 upper half upward
// for positive words; Loop2 lower half downward, then Loop1 lower half
// downward for negative words. Includes a watchdog.
module tb_fb_loop_decoder;
  import adpll_pkg::*;
  localparam int H = FBL_HALF;
  int checks = 0, failures = 0;
  logic signed [7:0] n;
  logic [2*H-1:0] fb_loop1, fb_loop2, p1, p2, e1, e2;

  fb_loop_decoder dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n = 8'sd0; #10;
    checks++;
    if (fb_loop1 !== {{H{1'b0}}, {H{1'b1}}} || fb_loop2 !== {{H{1'b0}}, {H{1'b1}}}) begin
      failures++; $display("FAIL: word 0 gives %b %b", fb_loop1, fb_loop2);
    end
    p1 = fb_loop1; p2 = fb_loop2;
    for (int k = 1; k <= 2 * H; k++) begin
      n = 8'(k); #10;
      e1 = p1; e2 = p2;
      if (k <= H) e1[H + k - 1] = 1'b1; else e2[k - 1] = 1'b1;
      checks++;
      if (fb_loop1 !== e1 || fb_loop2 !== e2 || $countones({fb_loop1, fb_loop2}) != 2 * H + k) begin
        failures++; $display("FAIL: word %0d gives %b %b", k, fb_loop1, fb_loop2);
      end
      p1 = fb_loop1; p2 = fb_loop2;
    end
    p1 = {{H{1'b0}}, {H{1'b1}}}; p2 = p1;
    for (int k = 1; k <= 2 * H; k++) begin
      n = -8'(k); #10;
      e1 = p1; e2 = p2;
      if (k <= H) e2[H - k] = 1'b0; else e1[2 * H - k] = 1'b0;
      checks++;
      if (fb_loop1 !== e1 || fb_loop2 !== e2 || $countones({fb_loop1, fb_loop2}) != 2 * H - k) begin
        failures++; $display("FAIL: word -%0d gives %b %b", k, fb_loop1, fb_loop2);
      end
      p1 = fb_loop1; p2 = fb_loop2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
