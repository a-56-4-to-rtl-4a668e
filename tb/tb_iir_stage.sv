`timescale 1ps/1fs
// tb_iir_stage: self-checking test of one first-order IIR stage.
// With the stage enabled it checks y = s + (x - s) / 2^lambda against a
// model state each cycle, for random inputs and shifts; with it disabled it
// checks that y follows x and the state tracks it, so that enabling later
// starts without a step. Also checks the DC gain of one by settling on a
// constant input. Includes a watchdog.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_iir_stage;
  localparam int W = 40;
  int checks = 0, failures = 0;
  logic ckr = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [3:0] lambda_sh = 4'd3;
  logic signed [W-1:0] x = '0, y;
  longint st, ym;

  iir_stage #(.W(W)) dut (.*);

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
    st = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge ckr);
      x  = W'($signed($urandom)) <<< 4;
      if (i % 100 == 0) begin en = $urandom_range(0, 1); lambda_sh = $urandom_range(0, 8); end
      #1;
      ym = en ? st + ((longint'(x) - st) >>> lambda_sh) : longint'(x);
      checks++;
      if (longint'(y) != ym) begin
        failures++; $display("FAIL: cycle %0d en=%b y=%0d expected %0d", i, en, y, ym);
      end
      @(posedge ckr);
      st = ym;
    end
    // DC gain: constant input settles to itself
    @(negedge ckr); en = 1'b1; lambda_sh = 4'd2; x = 40'sd1000000;
    repeat (200) @(negedge ckr);
    checks++;
    if (y > 40'sd1000000 || y < 40'sd999990) begin failures++; $display("FAIL: settled at %0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
