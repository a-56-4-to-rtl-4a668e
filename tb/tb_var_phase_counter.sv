`timescale 1ps/1fs
// tb_var_phase_counter: self-checking test of the CKV/32 edge counter.
// Runs the counter from reset for several thousand CKV/32 cycles, pulses
// capture at random intervals, and checks the free-running count every cycle
// and the captured Rv (count including the capturing edge) after each pulse,
// across the 12-bit wrap. Includes a watchdog.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_var_phase_counter;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  logic ckv32 = 1'b0, rst_n = 1'b1, capture = 1'b0;
  logic [PH_INT-1:0] count, rv, m_count, m_rv;

  var_phase_counter dut (.*);

  always #264 ckv32 = ~ckv32;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    @(negedge ckv32);
    checks++;
    if (count !== PH_INT'(1) || rv !== '0) begin
      failures++; $display("FAIL: after reset and one edge count=%0d rv=%0d", count, rv);
    end
    m_count = count; m_rv = '0;
    for (int i = 0; i < 6000; i++) begin
      capture = ($urandom_range(0, 18) == 0);
      @(posedge ckv32);
      m_count = m_count + 1'b1;
      if (capture) m_rv = m_count;
      #1;
      checks++;
      if (count !== m_count || rv !== m_rv) begin
        failures++;
        $display("FAIL: cycle %0d count=%0d rv=%0d expected %0d %0d", i, count, rv, m_count, m_rv);
      end
      @(negedge ckv32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
