`timescale 1ps/1fs
// tb_kdco_cal: self-checking test of the fine-bank gain calibration.
// A simple loop model stands in for the locked ADPLL: the fine-bank word
// follows the FCW offset with a delay shorter than the settle time, as
// word = base + fcw_ofs * G / 16 (cells, Q8.10), plus optional random noise
// of a few fraction LSBs. For random true gains G, deviations, base words
// and averaging lengths it checks that the offset steps +dev, -dev, 0, that
// busy and done behave, and that the result matches G within the rounding
// of the model (exact without noise, within a small bound with noise).
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_kdco_cal;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic ckr = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [3:0] log2n = 4'd4;
  logic [15:0] settle = 16'd20, dev = 16'd1000;
  logic signed [17:0] fb_word = '0;
  logic signed [FCW_W-1:0] fcw_ofs;
  logic busy, done, gain_valid;
  logic [15:0] gain;

  kdco_cal dut (.*);

  always #5000 ckr = ~ckr;
  initial begin #2s; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // loop model: word follows the offset after LAG cycles
  localparam int LAG = 8;
  int  g_true = 31220, base = 0, noise = 0;
  logic signed [FCW_W-1:0] ofs_pipe [LAG];
  always @(posedge ckr) begin
    longint w;
    for (int i = LAG - 1; i > 0; i--) ofs_pipe[i] <= ofs_pipe[i-1];
    ofs_pipe[0] <= fcw_ofs;
    // cells * 1024 = ofs/2^20 * G/16 * 1024 = ofs * G / 2^14
    w = longint'(base) + (longint'(ofs_pipe[LAG-1]) * longint'(g_true)) / 16384;
    if (noise > 0) w += longint'($urandom_range(0, 2 * noise)) - longint'(noise);
    fb_word <= 18'(w);
  end

  initial begin
    for (int i = 0; i < LAG; i++) ofs_pipe[i] = '0;
    #1 rst_n = 1'b0; #1000 rst_n = 1'b1;
    repeat (3) @(posedge ckr);
    chk(!busy && !gain_valid, "idle after reset");
    for (int n = 0; n < 40; n++) begin
      int seen_up, seen_dn, cyc, ndone;
      real expg;
      g_true = $urandom_range(8000, 60000);
      dev    = 16'($urandom_range(500, 4000));
      base   = $urandom_range(0, 20000) - 10000;
      log2n  = 4'($urandom_range(3, 9));
      settle = 16'($urandom_range(LAG + 2, 60));
      noise  = (n % 2 == 1) ? 3 : 0;
      // keep the model's word inside Q8.10 (+/-127 cells)
      while (int'(dev) * g_true / 16384 > 60000) dev = dev / 2;
      @(negedge ckr) start = 1'b1;
      @(negedge ckr) start = 1'b0;
      seen_up = 0; seen_dn = 0; cyc = 0; ndone = 0;
      while (busy && cyc < 20000) begin
        if (fcw_ofs == FCW_W'(dev))  seen_up++;
        if (fcw_ofs == -FCW_W'(dev)) seen_dn++;
        if (done) ndone++;
        @(negedge ckr); cyc++;
      end
      if (done) ndone++;
      chk(!busy, "calibration never finished");
      chk(seen_up > 0 && seen_dn > 0, "offset did not step both ways");
      chk(fcw_ofs == '0, "offset not removed");
      chk(ndone == 1 && gain_valid, "done / gain_valid");
      // expected: word difference per sample = 2*dev*G/2^14 (truncated per side)
      expg = real'(g_true);
      if (noise == 0)
        chk(absr(real'(gain) - expg) <= 0.02 * expg + 2.0,
            $sformatf("gain %0d expected %0d (dev %0d log2n %0d)", gain, g_true, dev, log2n));
      else
        chk(absr(real'(gain) - expg) <= 0.05 * expg + 4.0,
            $sformatf("noisy gain %0d expected %0d (dev %0d log2n %0d)", gain, g_true, dev, log2n));
      repeat ($urandom_range(1, 5)) @(negedge ckr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic real absr(real x); return x < 0.0 ? -x : x; endfunction
endmodule
