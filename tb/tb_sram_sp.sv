`timescale 1ps/1fs
// tb_sram_sp: self-checking test of the 512 x 16 single-port table SRAM.
// Fills all 512 words with random data, then runs random mixed reads and
// writes against a model array, checking that a read returns the stored
// word one clock later, that a write returns the old word (read before
// write), and that the output holds while the enable is low. Watchdog
// included.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_sram_sp;
  localparam int AW = 9, DW = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata, m [1 << AW], exp_d;

  sram_sp #(.AW(AW), .DW(DW)) dut (.*);

  always #1000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk); en = 1'b1; we = 1'b1; addr = AW'(a); wdata = DW'($urandom); m[a] = wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0); we = ($urandom_range(0, 2) == 0);
      addr = AW'($urandom); wdata = DW'($urandom);
      exp_d = en ? m[addr] : rdata;
      if (en && we) m[addr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== exp_d) begin
        failures++; $display("FAIL: en=%b we=%b addr=%0d rdata=%h expected %h", en, we, addr, rdata, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
