`timescale 1ps/1fs
// tb_phase_detector: self-checking test of the arithmetic phase detector.
// Applies random Rr, Rv, epsilon and edge-select values at each CKR edge and
// checks, one cycle later, phi_E = Rr - (Rv + c) - epsilon (c = 1 when the
// falling-edge path was used for an epsilon below one half) as a signed
// value modulo 2^12 CKV/32 periods, and the variable phase {Rv + c, eps}.
// Includes a watchdog.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_phase_detector;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  logic ckr = 1'b0, rst_n = 1'b1, sel_edge = 1'b0;
  logic [PH_W-1:0] rr = '0, phv;
  logic [PH_INT-1:0] rv = '0;
  logic [PH_FRAC-1:0] eps = '0;
  logic signed [PH_W-1:0] phe;
  real m_phe, got;
  longint m_rvc;

  phase_detector dut (.*);

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
    for (int i = 0; i < 1000; i++) begin
      @(negedge ckr);
      rr = $urandom; rv = PH_INT'($urandom); eps = PH_FRAC'($urandom); sel_edge = $urandom_range(0, 1);
      m_rvc = (longint'(rv) + ((sel_edge && eps < (1 << (PH_FRAC - 1))) ? 1 : 0)) % (1 << PH_INT);
      // reference value in real arithmetic, wrapped to [-2048, 2048)
      m_phe = real'(rr) / real'(1 << PH_FRAC) - real'(m_rvc) - real'(eps) / real'(1 << PH_FRAC);
      while (m_phe >= 2048.0) m_phe -= 4096.0;
      while (m_phe < -2048.0) m_phe += 4096.0;
      @(posedge ckr); #1;
      got = real'(phe) / real'(1 << PH_FRAC);
      checks++;
      if (got != m_phe || phv !== {PH_INT'(m_rvc), eps}) begin
        failures++;
        $display("FAIL: rr=%h rv=%0d eps=%h sel=%b: phe %f phv %h, expected %f", rr, rv, eps, sel_edge, got, phv, m_phe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
