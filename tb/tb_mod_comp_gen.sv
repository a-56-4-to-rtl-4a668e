`timescale 1ps/1fs
// tb_mod_comp_gen: self-checking test of the reference-side compensation
// ramp. With a random slope and a half period of 37 CKR cycles it checks,
// cycle by cycle against a model, that the compensation word rises by the
// slope each cycle, reverses direction every half period (a triangle
// between 0 and slope * 37), and returns to zero when modulation stops. A
// watchdog bounds the run.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_mod_comp_gen;
  import adpll_pkg::*;
  int checks = 0, failures = 0, n_turn = 0;
  logic ckr = 1'b0, rst_n = 1'b1, mod_en = 1'b0;
  logic [31:0] step = '0;
  logic [23:0] n_half = 24'd37;
  logic signed [FCW_W-1:0] comp;
  logic up, up_d;
  longint acc, h;
  bit dir, run;

  mod_comp_gen dut (.*);

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
    step = $urandom_range(1 << 20, 1 << 28);
    acc = 0; h = 0; dir = 1; run = 0;
    @(negedge ckr); mod_en = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(posedge ckr);
      if (run) begin
        acc = dir ? acc + step : acc - step;
        if (h == 36) begin h = 0; dir = !dir; n_turn++; end else h++;
      end
      run = 1;
      #1;
      checks++;
      if (longint'(comp) != (acc >>> COMP_XF) || up != dir || acc < 0) begin
        failures++; $display("FAIL: cycle %0d comp=%0d up=%b expected %0d %b", i, comp, up, acc >>> COMP_XF, dir);
      end
    end
    @(negedge ckr); mod_en = 1'b0;
    @(negedge ckr);
    checks++;
    if (comp != 0 || !up) begin failures++; $display("FAIL: not cleared when stopped"); end
    checks++;
    if (n_turn < 10) begin failures++; $display("FAIL: only %0d reversals", n_turn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
