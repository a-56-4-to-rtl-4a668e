// dco_model: behavioural model of the 60 GHz digitally controlled oscillator
// (not synthesizable; the real part is an LC oscillator with switched-metal
// capacitor banks).
//
// The output frequency is the sum of the contributions of the coarse bank
// (CB index, 367 MHz per step), the mid-coarse bank (MB index, 35 MHz per
// step), the ON cells of the two FB_Loop sub-banks and of FB_Mod (1.64 MHz
// per cell), and the two SigmaDelta dither inputs. The step sizes are the
// document's measured values; the linear sum, the base frequency and the
// optional dither-cell mismatch (DITH_ERR) are model choices. The model
// keeps an ideal edge time in real picoseconds (1 fs precision) so that frequency changes
// far below one time step are still represented on average. Frequency is
// re-evaluated at every half period. Codes are effective codes: a larger code
// means a higher frequency.
`timescale 1ps/1fs
module dco_model
  import adpll_pkg::*;
#(
  parameter real F_BASE   = 53.9e9,   // Hz with all banks at zero
  parameter real K_CB     = 367.0e6,
  parameter real K_MB     = 35.0e6,
  parameter real K_FB     = 1.64e6,
  parameter real DITH_ERR = 0.0       // relative error of the FB_Mod dither cell
) (
  input  logic                   en,
  input  logic [CB_W-1:0]        cb,
  input  logic [MB_W-1:0]        mb,
  input  logic [FBL_BITS-1:0]    fb_loop1,
  input  logic [FBL_BITS-1:0]    fb_loop2,
  input  logic [FBM_BITS-1:0]    fb_mod,
  input  logic signed [2:0]      dith_loop,
  input  logic signed [2:0]      dith_mod,
  output logic                   ckv,
  output real                    freq_hz     // instantaneous frequency (monitor)
);
  real t_next;

  always_comb begin
    freq_hz = F_BASE + K_CB * real'(cb) + K_MB * real'(mb)
            + K_FB * real'($countones(fb_loop1) + $countones(fb_loop2) + int'(dith_loop))
            + K_FB * real'($countones(fb_mod))
            + K_FB * (1.0 + DITH_ERR) * real'(int'(dith_mod));
  end

  initial begin
    ckv    = 1'b0;
    t_next = 0.0;
    forever begin
      if (!en) begin
        ckv = 1'b0;
        @(posedge en);
        t_next = $realtime;
      end
      t_next = t_next + 0.5e12 / freq_hz;
      #(t_next - $realtime);
      ckv = ~ckv;
    end
  end
endmodule
