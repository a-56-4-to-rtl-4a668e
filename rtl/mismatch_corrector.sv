`timescale 1ps/1fs
// mismatch_corrector: gain correction of the FB_Mod fractional tuning word
// for the mismatch of the SigmaDelta dither cell.
//
// The dither cell's frequency step differs from the average integer-cell step
// by a relative error eps, measured open-loop. Before the fraction enters the
// SigmaDelta it is multiplied by (1 + eps): a reduced-size 10 x 8 multiplier
// forms frac * |eps|, a right shift by 10 scales it (|eps| = code / 1024, so
// the 8-bit code covers up to 25 % with 0.1 % resolution), the sign of eps
// chooses between adding and subtracting, and an adder combines it with the
// uncorrected fraction. This is the document's structure. The document sizes
// the dither cell so that the factor stays below one; this design also
// saturates the result so a positive eps cannot wrap. Combinational.
module mismatch_corrector
  import adpll_pkg::*;
(
  input  logic [FBM_FRAC_W-1:0] frac_in,
  input  logic [EPS_W-1:0]      eps_mag,
  input  logic                  eps_neg,
  output logic [FBM_FRAC_W-1:0] frac_out
);
  logic [FBM_FRAC_W+EPS_W-1:0] prod;
  logic [EPS_W-1:0]            corr;
  logic signed [FBM_FRAC_W+1:0] sum;

  always_comb begin
    prod = frac_in * eps_mag;
    corr = prod[FBM_FRAC_W +: EPS_W];                 // >> 10
    sum  = eps_neg ? $signed({2'b00, frac_in}) - $signed({4'b0000, corr})
                   : $signed({2'b00, frac_in}) + $signed({4'b0000, corr});
    if (sum < 0)                               frac_out = '0;
    else if (sum > (1 << FBM_FRAC_W) - 1)      frac_out = '1;
    else                                       frac_out = sum[FBM_FRAC_W-1:0];
  end
endmodule
