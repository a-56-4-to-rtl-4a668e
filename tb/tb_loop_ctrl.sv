`timescale 1ps/1fs
// tb_loop_ctrl: self-checking test of the acquisition sequencer.
// Starts an acquisition and checks that the controller steps through CB,
// MB, type-I tracking and type-II tracking with the programmed lengths
// (length + 1 reference cycles each), clears the loop filter at each switch
// and selects the right gain, filter type and IIR enable per mode. With a
// fixed loop-filter output it checks the bank words: CB = base +
// round(lf * norm / 2^25), MB likewise with 2^24, FB_Loop integer and
// fraction = lf * norm / 2^20 clamped to +/-22, and the phase error sent to
// the filter is the input minus the value captured at the last switch.
// Includes a watchdog.
// The expected behaviour is the one the design document gives for the block;
// the stimulus, the reference model and the tolerances are this test's own.
module tb_loop_ctrl;
  import adpll_pkg::*;
  int checks = 0, failures = 0;
  logic ckr = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [15:0] cb_cycles = 16'd20, mb_cycles = 16'd30, trk1_cycles = 16'd40;
  logic [4:0] alpha_cb = 5'd3, alpha_mb = 5'd5, alpha_trk1 = 5'd7, alpha_trk2 = 5'd9;
  logic [NORM_W-1:0] norm = NORM_W'(3200);
  logic [CB_W-1:0] cb_init = 5'd16, cb;
  logic [MB_W-1:0] mb_init = 4'd8, mb;
  logic signed [PH_W-1:0] phe = '0, lf_phe;
  logic signed [LF_W-1:0] lf_out = '0;
  loop_mode_e mode;
  logic lf_clr, lf_type2, lf_iir_en, track_on;
  logic [4:0] lf_alpha_sh;
  logic signed [7:0] fbl_int;
  logic [OTW_FRAC-1:0] fbl_frac;
  int n_mode [5];
  int n_clr;
  longint phe_snap;

  loop_ctrl dut (.*);

  always #5000 ckr = ~ckr;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd_shift(longint v, int sh);
    return (v + (longint'(1) << (sh - 1))) >>> sh;
  endfunction

  always @(posedge ckr) begin
    n_mode[mode]++;
    if (lf_clr && mode != M_IDLE) n_clr++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint otw;
    for (int i = 0; i < 5; i++) n_mode[i] = 0;
    n_clr = 0;
    #1000 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    repeat (3) @(negedge ckr);
    chk(mode == M_IDLE && cb == cb_init && mb == mb_init && lf_clr, "idle state");
    // CB stage: lf_out of +2.5 CB steps
    phe = 32'sd12345;
    lf_out = 40'sd26214;      // * 3200 / 2^25 = 2.4999
    start = 1'b1; @(negedge ckr); start = 1'b0;
    chk(mode == M_CB, "start enters CB");
    phe = 32'sd22345;
    #1;
    chk(lf_phe == 32'sd10000, $sformatf("lf_phe %0d in CB", lf_phe));
    chk(lf_alpha_sh == alpha_cb && !lf_type2 && !lf_iir_en && !track_on, "CB gains");
    @(negedge ckr);
    otw = 26214 * 3200;
    chk(cb == 5'(16 + rnd_shift(otw, 25)), $sformatf("CB word %0d", cb));
    wait (mode == M_MB);
    @(negedge ckr);
    chk(n_mode[M_CB] == 21, $sformatf("CB lasted %0d cycles", n_mode[M_CB]));
    chk(lf_alpha_sh == alpha_mb, "MB gain");
    lf_out = -40'sd20000;     // * 3200 / 2^24 = -3.81
    @(negedge ckr);
    otw = -20000 * 3200;
    chk(mb == 4'(8 + rnd_shift(otw, 24)), $sformatf("MB word %0d", mb));
    wait (mode == M_TRK1);
    @(negedge ckr);
    chk(n_mode[M_MB] == 31, $sformatf("MB lasted %0d cycles", n_mode[M_MB]));
    chk(lf_alpha_sh == alpha_trk1 && !lf_type2 && track_on, "type-I tracking settings");
    lf_out = 40'sd1638;       // * 3200 / 2^20 = 4.999
    @(negedge ckr); @(negedge ckr);
    otw = 1638 * 3200;
    chk(fbl_int == 8'(otw >>> 20) && fbl_frac == OTW_FRAC'(otw >>> (PH_FRAC - OTW_FRAC)),
        $sformatf("FB_Loop word %0d.%0d", fbl_int, fbl_frac));
    lf_out = 40'sd100000;     // beyond +22
    @(negedge ckr); @(negedge ckr);
    chk(fbl_int == 8'sd22 && fbl_frac == '0, $sformatf("FB_Loop clamp high %0d", fbl_int));
    lf_out = -40'sd100000;
    @(negedge ckr); @(negedge ckr);
    chk(fbl_int == -8'sd22, $sformatf("FB_Loop clamp low %0d", fbl_int));
    wait (mode == M_TRK2);
    @(negedge ckr);
    chk(n_mode[M_TRK1] == 41, $sformatf("TRK1 lasted %0d cycles", n_mode[M_TRK1]));
    chk(lf_alpha_sh == alpha_trk2 && lf_type2 && lf_iir_en && track_on, "type-II tracking settings");
    chk(cb == 5'(16 + rnd_shift(26214 * 3200, 25)) && mb == 4'(8 + rnd_shift(-20000 * 3200, 24)),
        "CB and MB frozen during tracking");
    chk(n_clr == 3, $sformatf("%0d loop filter clears (CB entry and two bank switches)", n_clr));
    repeat (100) @(negedge ckr);
    chk(mode == M_TRK2, "stays in type-II tracking");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
