`timescale 1ps/1fs
// tb_sigma_delta: self-checking test of the fractional-word SigmaDelta.
// For random fractional words, in first order it checks that the output is
// 0 or 1 and that any 2^W consecutive outputs sum exactly to the word; in
// second order (MASH 1-1) it checks the output range -1..2 and that the sum
// over 2^W cycles is the word within +/-2, and that the second-order output
// actually uses values outside 0..1 (noise shaping is present). A watchdog
// bounds the run.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_sigma_delta;
  localparam int W = 10;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, order2 = 1'b0;
  logic [W-1:0] frac = '0;
  logic signed [2:0] dout;
  int sum, n_out;

  sigma_delta #(.W(W)) dut (.*);

  always #500 clk = ~clk;

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
    for (int t = 0; t < 16; t++) begin
      @(negedge clk);
      order2 = t[0];
      frac   = (t < 2) ? W'(t * 1023) : W'($urandom);
      repeat (8) @(negedge clk);          // let the pipeline take the new word
      sum = 0; n_out = 0;
      for (int i = 0; i < (1 << W); i++) begin
        @(negedge clk);
        sum += int'(dout);
        if (dout < -3'sd1 || dout > 3'sd2 || (!order2 && dout < 0) || (!order2 && dout > 1)) begin
          checks++; failures++; $display("FAIL: output %0d out of range, order2=%b", dout, order2);
        end
        if (dout < 0 || dout > 1) n_out++;
      end
      checks++;
      if ((!order2 && sum != int'(frac)) || (order2 && (sum > int'(frac) + 2 || sum < int'(frac) - 2))) begin
        failures++; $display("FAIL: order2=%b frac=%0d sum over 2^W cycles %0d", order2, frac, sum);
      end
      if (order2 && frac > 100 && frac < 900) begin
        checks++;
        if (n_out == 0) begin failures++; $display("FAIL: second order never left 0..1 for frac=%0d", frac); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
