`timescale 1ps/1fs
// tb_arith_divider: self-checking test of the shared sequential divider.
// Issues random 32-bit / 16-bit divisions (and some by zero) and checks the
// quotient and remainder against the simulator's own arithmetic, that busy
// is high while the division runs, and that done arrives exactly 33 clock
// cycles after the start pulse (one load cycle, then one quotient bit per
// cycle). Watchdog included.
module tb_arith_divider;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [31:0] num = '0, quot;
  logic [15:0] den = '0, rem;
  logic busy, done;
  int lat;

  arith_divider #(.NW(32), .DW(16)) dut (.*);

  always #500 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      num = $urandom;
      den = (i % 50 == 7) ? 16'd0 : (i % 3 == 0) ? 16'($urandom_range(1, 255)) : 16'($urandom);
      start = 1'b1;
      @(negedge clk); start = 1'b0;
      lat = 1;
      checks++;
      if (!busy) begin failures++; $display("FAIL: busy not raised"); end
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (den == 0) begin
        if (quot !== '1) begin failures++; $display("FAIL: divide by zero gave %h", quot); end
      end else if (quot !== num / den || rem !== 16'(num % den)) begin
        failures++; $display("FAIL: %0d / %0d gave %0d r %0d", num, den, quot, rem);
      end
      checks++;
      if (lat != 33 || busy) begin failures++; $display("FAIL: latency %0d cycles", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
