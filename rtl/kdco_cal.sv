`timescale 1ps/1fs
// kdco_cal: closed-loop fine-bank DCO gain (K_DCO) calibration by digital
// averaging, giving the FSK direct-path gain 32 f_R / K_DCO.
//
// With the loop locked in tracking, the block offsets the channel FCW by
// +dev, waits `settle` reference cycles for the loop to follow, and sums
// 2^log2n samples of the loop's fine-bank tuning word (integer and fraction,
// 10 fraction bits). It repeats this with -dev, then removes the offset. The
// loop has moved the fine bank by dW = 2 dev (32 f_R) / K_DCO cells between
// the two sums, so the direct-path gain in cells per FCW unit is
// dW / (2 dev); in the Q12.4 format of the FSK path this is
//   gain = (sum_up - sum_dn) * 2^(13 - log2n) / dev_code,
// with dev_code in FCW LSBs (2^-20). The shared-style sequential divider
// computes it; the result saturates to 16 bits and is zero if the difference
// is not positive.
// Interface and timing (CKR domain): pulse start while idle; busy stays high
// for about 2 (settle + 2^log2n) + 36 cycles; done pulses once with gain valid,
// and gain_valid stays high afterwards. fcw_ofs is the signed offset to add
// to the channel FCW. log2n must be at most 12.
// The document calibrates the FB_Mod gain automatically by digital averaging
// and applies it to the FSK normalization multiplier; this particular
// procedure (a +/-dev reference step, averaging the loop's own tuning word)
// and its timing are this design's choices. It measures the gain of the
// loop's fine-bank cells, which are the same unit cells as FB_Mod.
module kdco_cal
  import adpll_pkg::*;
(
  input  logic                     ckr,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [3:0]               log2n,
  input  logic [15:0]              settle,
  input  logic [15:0]              dev,        // FCW LSBs (2^-20)
  input  logic signed [17:0]       fb_word,    // {fbl_int, fbl_frac}: Q8.10
  output logic signed [FCW_W-1:0]  fcw_ofs,
  output logic                     busy,
  output logic                     done,
  output logic [15:0]              gain,       // Q12.4, 32 f_R / K_DCO
  output logic                     gain_valid
);
  typedef enum logic [2:0] {K_IDLE, K_UP_SET, K_UP_ACC, K_DN_SET, K_DN_ACC, K_DIV, K_WAIT} st_e;
  st_e st;

  logic [15:0]        cnt;
  logic signed [35:0] acc_up, acc_dn, diff;
  logic [31:0]        num;
  logic               dv_start, dv_busy, dv_done;
  logic [31:0]        dv_quot;
  logic [15:0]        dv_rem;
  logic [15:0]        n_acc;

  always_comb begin
    n_acc = (16'(1) << log2n) - 16'd1;
    diff  = acc_up - acc_dn;
    if (diff > 0) num = 32'(diff <<< (5'd13 - 5'(log2n)));
    else          num = '0;
  end

  assign dv_start = (st == K_DIV);
  arith_divider #(.NW(32), .DW(16)) u_div (
    .clk(ckr), .rst_n, .start(dv_start), .num, .den(dev),
    .busy(dv_busy), .done(dv_done), .quot(dv_quot), .rem(dv_rem)
  );

  assign busy = (st != K_IDLE);

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      st <= K_IDLE; cnt <= '0; acc_up <= '0; acc_dn <= '0; fcw_ofs <= '0;
      done <= 1'b0; gain <= '0; gain_valid <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        K_IDLE: if (start) begin
          fcw_ofs <= FCW_W'(dev); cnt <= '0; acc_up <= '0; acc_dn <= '0;
          st <= K_UP_SET;
        end
        K_UP_SET: begin
          cnt <= cnt + 16'd1;
          if (cnt == settle) begin cnt <= '0; st <= K_UP_ACC; end
        end
        K_UP_ACC: begin
          acc_up <= acc_up + 36'(fb_word);
          cnt    <= cnt + 16'd1;
          if (cnt == n_acc) begin cnt <= '0; fcw_ofs <= -FCW_W'(dev); st <= K_DN_SET; end
        end
        K_DN_SET: begin
          cnt <= cnt + 16'd1;
          if (cnt == settle) begin cnt <= '0; st <= K_DN_ACC; end
        end
        K_DN_ACC: begin
          acc_dn <= acc_dn + 36'(fb_word);
          cnt    <= cnt + 16'd1;
          if (cnt == n_acc) begin cnt <= '0; fcw_ofs <= '0; st <= K_DIV; end
        end
        K_DIV: st <= K_WAIT;
        K_WAIT: if (dv_done) begin
          gain       <= (dv_quot > 32'(16'hFFFF)) ? 16'hFFFF : dv_quot[15:0];
          gain_valid <= 1'b1;
          done       <= 1'b1;
          st         <= K_IDLE;
        end
        default: st <= K_IDLE;
      endcase
    end
  end
endmodule
