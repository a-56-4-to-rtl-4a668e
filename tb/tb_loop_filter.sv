`timescale 1ps/1fs
// tb_loop_filter: self-checking test of the gear-shifting loop filter.
// Part 1 compares the output every cycle with an independent model of the
// four IIR stages, the proportional path 2^-alpha, the integral path 2^-rho
// and the gear-shift offset, while phase errors, modes, IIR enables and
// gains change at random. Part 2 checks the behaviours directly: in type-I
// mode a constant error gives error * 2^-alpha; changing alpha while the
// error is constant leaves the output unchanged (hitless gear shift); in
// type-II mode the output ramps by error * 2^-rho per cycle. Watchdog
// included.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_loop_filter;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  logic ckr = 1'b0, rst_n = 1'b1, clr = 1'b0, type2 = 1'b0, iir_en = 1'b0;
  logic signed [PH_W-1:0] phe = '0;
  logic [3:0] lambda_sh [4];
  logic [4:0] alpha_sh = 5'd4, rho_sh = 5'd10;
  logic signed [LF_W-1:0] lf_out;
  longint st[4], s[5], integ, offset, alpha_q, outm, pn, po, last;

  loop_filter dut (.*);

  always #5000 ckr = ~ckr;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_model();
    s[0] = phe;
    for (int i = 0; i < 4; i++) begin
      s[i+1] = (iir_en && !clr) ? st[i] + ((s[i] - st[i]) >>> lambda_sh[i]) : s[i];
      st[i]  = s[i+1];
    end
    if (clr) begin
      integ = 0; offset = 0; alpha_q = alpha_sh; outm = 0;
    end else begin
      po = s[4] >>> alpha_q;
      pn = s[4] >>> alpha_sh;
      if (type2) integ = integ + (s[4] >>> rho_sh);
      offset = offset + po - pn;
      alpha_q = alpha_sh;
      outm = pn + integ + offset;
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) lambda_sh[i] = 4'(i + 2);
    #1000 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    for (int i = 0; i < 4; i++) st[i] = 0;
    integ = 0; offset = 0; alpha_q = alpha_sh; outm = 0;
    // part 1: random against the model
    for (int n = 0; n < 3000; n++) begin
      @(negedge ckr);
      phe = PH_W'($signed($urandom_range(0, 1 << 22)) - (1 << 21));
      if (n % 97 == 0) begin
        type2 = $urandom_range(0, 1); iir_en = type2 & $urandom_range(0, 1);
        alpha_sh = $urandom_range(2, 10); rho_sh = $urandom_range(8, 14);
        for (int i = 0; i < 4; i++) lambda_sh[i] = $urandom_range(1, 6);
      end
      clr = ($urandom_range(0, 199) == 0);
      @(posedge ckr);
      step_model();
      #1;
      checks++;
      if (longint'(lf_out) != outm) begin
        failures++; $display("FAIL: cycle %0d lf_out=%0d expected %0d", n, lf_out, outm);
      end
    end
    // part 2a: type-I, constant error
    @(negedge ckr); clr = 1'b1; type2 = 1'b0; iir_en = 1'b0; alpha_sh = 5'd4; phe = 32'sd1 <<< 20;
    @(negedge ckr); clr = 1'b0;
    repeat (3) @(negedge ckr);
    checks++;
    if (lf_out != (40'sd1 <<< 16)) begin failures++; $display("FAIL: type-I gain, lf_out=%0d", lf_out); end
    // part 2b: hitless gear shift
    last = lf_out;
    alpha_sh = 5'd7;
    repeat (3) @(negedge ckr);
    checks++;
    if (longint'(lf_out) != last) begin failures++; $display("FAIL: gear shift stepped the output %0d -> %0d", last, lf_out); end
    // part 2c: type-II integral ramp
    type2 = 1'b1; rho_sh = 5'd12;
    @(negedge ckr); last = lf_out;
    @(negedge ckr);
    checks++;
    if (longint'(lf_out) - last != (longint'(1) << 8)) begin
      failures++; $display("FAIL: integral step %0d", longint'(lf_out) - last);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
