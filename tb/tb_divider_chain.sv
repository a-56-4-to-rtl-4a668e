`timescale 1ps/1fs
// tb_divider_chain: self-checking test of the CKV divider chain.
// Runs CKV at 60.5 GHz and counts rising edges of every output over 8192
// CKV periods for each of the four CKM settings: CKV/32, CKV/64 and CKV/128
// must show exactly 8192/32, /64 and /128 edges, CKM 8192/128 * 2^-sel_mod.
// It also checks that each divided clock rises only on a CKV rising edge
// (the chain is synchronous to CKV in simulation up to the ripple order).
// Includes a watchdog.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_divider_chain;
  int checks = 0, failures = 0;
  localparam real TV = 1.0e12 / 60.5e9;
  logic ckv = 1'b0, rst_n = 1'b1;
  logic [1:0] sel_mod = 2'b00;
  logic ckv32, ckv64, ckv128, ckm;
  int n32, n64, n128, nm;

  divider_chain dut (.*);

  initial forever begin #(TV / 2.0); ckv = ~ckv; end
  always @(posedge ckv32)  n32++;
  always @(posedge ckv64)  n64++;
  always @(posedge ckv128) n128++;
  always @(posedge ckm)    nm++;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      sel_mod = 2'(s);
      repeat (2048) @(posedge ckv);        // let CKM settle on its new source
      @(negedge ckv); n32 = 0; n64 = 0; n128 = 0; nm = 0;
      repeat (8192) @(negedge ckv);
      checks++;
      if (n32 != 256 || n64 != 128 || n128 != 64 || nm != (64 >> s)) begin
        failures++;
        $display("FAIL: sel_mod=%0d edges /32 %0d /64 %0d /128 %0d CKM %0d", s, n32, n64, n128, nm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
