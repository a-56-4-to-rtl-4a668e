`timescale 1ps/1fs
// tb_lut_cal: self-checking test of the table-entry calculator.
// Sends random (index, FB_min, FB_max, dn) records, including FB_max below
// FB_min, dn = 0 and very small dn (saturating steps), with random gaps
// between records, and checks for each: exactly one table write, at the
// record's index, with FB_min and FB_max passed through and FB_step equal to
// round((FB_max - FB_min) * 2^6 / dn) saturated to 16 bits (zero when
// FB_max <= FB_min, all ones when dn = 0), that in_ready is low while a
// record is being processed, and the latency from acceptance to write.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_lut_cal;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, in_ready, tbl_we;
  logic [LUT_AW-1:0] in_idx = '0, tbl_addr;
  logic [LUT_DW-1:0] in_fb_min = '0, in_fb_max = '0;
  logic [23:0] in_dn = '0;
  lut_entry_t tbl_data;

  lut_cal dut (.*);

  always #500 clk = ~clk;
  initial begin #50ms; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int writes = 0;
  always @(posedge clk) if (tbl_we) writes++;

  function automatic logic [15:0] ref_step(logic [15:0] mn, mx, logic [23:0] dn);
    longint num, q;
    if (dn == 0) return 16'hFFFF;
    if (mx <= mn) return 16'h0;
    num = (longint'(mx) - longint'(mn)) * 64 + longint'(dn >> 1);
    q = num / longint'(dn);
    return (q > 65535) ? 16'hFFFF : 16'(q);
  endfunction

  initial begin
    int lat;
    logic [15:0] exp_step;
    #1 rst_n = 1'b0; #1000 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int w0;
      @(negedge clk);
      chk(in_ready, "not ready when idle");
      in_idx    = LUT_AW'($urandom);
      in_fb_min = 16'($urandom_range(0, 38 * 1024));
      case ($urandom_range(0, 9))
        0:       in_fb_max = 16'($urandom_range(0, 38 * 1024));   // may be below FB_min
        default: in_fb_max = 16'(int'(in_fb_min) + $urandom_range(0, 30 * 1024));
      endcase
      case ($urandom_range(0, 9))
        0:       in_dn = 24'd0;
        1:       in_dn = 24'($urandom_range(1, 20));
        default: in_dn = 24'($urandom_range(1, 1 << 20));
      endcase
      exp_step = ref_step(in_fb_min, in_fb_max, in_dn);
      w0 = writes;
      in_valid = 1'b1;
      @(negedge clk) in_valid = 1'b0;
      lat = 0;
      while (!tbl_we && lat < 100) begin
        chk(!in_ready || lat > 40, "ready while busy");
        @(negedge clk); lat++;
      end
      chk(tbl_we, "no table write");
      chk(lat == 35, $sformatf("latency %0d", lat));
      chk(tbl_addr == in_idx, "write address");
      chk(tbl_data.fb_min == in_fb_min && tbl_data.fb_max == in_fb_max, "FB_min/FB_max");
      chk(tbl_data.fb_step == exp_step,
          $sformatf("step %0d exp %0d (min %0d max %0d dn %0d)", tbl_data.fb_step, exp_step,
                    in_fb_min, in_fb_max, in_dn));
      @(negedge clk);
      chk(writes == w0 + 1, "not exactly one write");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
