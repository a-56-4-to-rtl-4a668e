`timescale 1ps/1fs
// loop_ctrl: bank acquisition sequencer, gear-shift control and DCO gain
// normalization of the ADPLL loop.
//
// After 'start' the loop walks through four modes on fixed CKR-cycle budgets:
// coarse bank (CB) and mid-coarse bank (MB) acquisition in type-I, fine-bank
// (FB_Loop) tracking in type-I with a wide bandwidth, and finally fine-bank
// tracking in type-II with the 4th-order IIR switched in (narrow bandwidth).
// The loop-filter output (FCW units) is multiplied by norm = 32 f_R / K_DCO
// (K_DCO taken as 1 MHz per FB LSB, so 3200 for f_R = 100 MHz) to give a
// tuning word in FB LSBs; the coarser banks use the same word shifted right by
// 5 (CB/FB = 32) and 4 (MB/FB = 16), as the document prescribes. On each
// move to the next bank the active bank word is frozen, the loop filter is
// cleared and the present phase error is stored as an offset, so the next
// bank starts from zero correction. FB_Loop starts re-centred (state 0). The
// mode budgets, per-mode gains and the phase offset are this design's
// choices; the document gives the bank ratios and the type-I to type-II
// gear shift. All outputs are registered on CKR.
module loop_ctrl
  import adpll_pkg::*;
(
  input  logic                     ckr,
  input  logic                     rst_n,
  input  logic                     start,        // pulse: begin acquisition
  input  logic [15:0]              cb_cycles,
  input  logic [15:0]              mb_cycles,
  input  logic [15:0]              trk1_cycles,
  input  logic [4:0]               alpha_cb, alpha_mb, alpha_trk1, alpha_trk2,
  input  logic [NORM_W-1:0]        norm,         // 32*f_R/K_DCO
  input  logic [CB_W-1:0]          cb_init,
  input  logic [MB_W-1:0]          mb_init,
  input  logic signed [PH_W-1:0]   phe,          // glitch-free phase error
  input  logic signed [LF_W-1:0]   lf_out,
  output loop_mode_e               mode,
  output logic signed [PH_W-1:0]   lf_phe,       // phase error sent to the LF
  output logic                     lf_clr,
  output logic [4:0]               lf_alpha_sh,
  output logic                     lf_type2,
  output logic                     lf_iir_en,
  output logic                     track_on,
  output logic [CB_W-1:0]          cb,
  output logic [MB_W-1:0]          mb,
  output logic signed [7:0]        fbl_int,      // FB_Loop integer, 0 = state 0
  output logic [OTW_FRAC-1:0]      fbl_frac      // FB_Loop fraction for SigmaDelta
);
  localparam int OTW_W = LF_W + NORM_W;
  localparam int FBL_MAX = FBL_BITS;  // +/- full FB_Loop range

  logic signed [OTW_W-1:0] otw;       // FB LSBs, PH_FRAC fractional bits
  logic signed [OTW_W-1:0] cb_d, mb_d, fb_d;
  logic signed [PH_W-1:0]  phe_off;
  logic [15:0]             cnt;
  logic [CB_W-1:0]         cb_base;
  logic [MB_W-1:0]         mb_base;
  logic signed [OTW_W-1:0] cb_new, mb_new;

  localparam logic signed [OTW_W-1:0] HALF_CB = OTW_W'(1) <<< (PH_FRAC + 4);
  localparam logic signed [OTW_W-1:0] HALF_MB = OTW_W'(1) <<< (PH_FRAC + 3);

  always_comb begin
    otw    = OTW_W'(lf_out) * signed'({1'b0, norm});
    cb_d   = (otw + HALF_CB) >>> (PH_FRAC + 5);   // rounded CB correction
    mb_d   = (otw + HALF_MB) >>> (PH_FRAC + 4);   // rounded MB correction
    fb_d   = otw >>> (PH_FRAC - OTW_FRAC);        // FB, OTW_FRAC fraction bits
    cb_new = OTW_W'(cb_base) + cb_d;
    mb_new = OTW_W'(mb_base) + mb_d;
    lf_phe = phe - phe_off;
  end

  function automatic logic [CB_W-1:0] sat_cb(logic signed [OTW_W-1:0] v);
    if (v < 0)                          return '0;
    else if (v > OTW_W'((1<<CB_W)-1))   return '1;
    else                                return v[CB_W-1:0];
  endfunction
  function automatic logic [MB_W-1:0] sat_mb(logic signed [OTW_W-1:0] v);
    if (v < 0)                          return '0;
    else if (v > OTW_W'((1<<MB_W)-1))   return '1;
    else                                return v[MB_W-1:0];
  endfunction

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= M_IDLE;
      cnt      <= '0;
      phe_off  <= '0;
      lf_clr   <= 1'b1;
      cb_base  <= '0;
      mb_base  <= '0;
      cb       <= '0;
      mb       <= '0;
      fbl_int  <= '0;
      fbl_frac <= '0;
    end else begin
      lf_clr <= 1'b0;
      cnt    <= cnt + 1'b1;
      unique case (mode)
        M_IDLE: begin
          cb <= cb_init; mb <= mb_init; cb_base <= cb_init; mb_base <= mb_init;
          fbl_int <= '0; fbl_frac <= '0;
          lf_clr <= 1'b1;
          if (start) begin
            mode <= M_CB; cnt <= '0; phe_off <= phe;
          end
        end
        M_CB: begin
          cb <= sat_cb(cb_new);
          if (cnt == cb_cycles) begin
            mode <= M_MB; cnt <= '0; phe_off <= phe; lf_clr <= 1'b1;
            cb_base <= sat_cb(cb_new);
          end
        end
        M_MB: begin
          mb <= sat_mb(mb_new);
          if (cnt == mb_cycles) begin
            mode <= M_TRK1; cnt <= '0; phe_off <= phe; lf_clr <= 1'b1;
            mb_base <= sat_mb(mb_new);
          end
        end
        M_TRK1, M_TRK2: begin
          if (fb_d > OTW_W'(FBL_MAX <<< OTW_FRAC))
            {fbl_int, fbl_frac} <= {8'(FBL_MAX), {OTW_FRAC{1'b0}}};
          else if (fb_d < -OTW_W'(FBL_MAX <<< OTW_FRAC))
            {fbl_int, fbl_frac} <= {8'(-FBL_MAX), {OTW_FRAC{1'b0}}};
          else
            {fbl_int, fbl_frac} <= fb_d[8+OTW_FRAC-1:0];
          if (mode == M_TRK1 && cnt == trk1_cycles) mode <= M_TRK2;
        end
        default: mode <= M_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (mode)
      M_CB:    lf_alpha_sh = alpha_cb;
      M_MB:    lf_alpha_sh = alpha_mb;
      M_TRK1:  lf_alpha_sh = alpha_trk1;
      default: lf_alpha_sh = alpha_trk2;
    endcase
    lf_type2  = (mode == M_TRK2);
    lf_iir_en = (mode == M_TRK2);
    track_on  = (mode == M_TRK1) || (mode == M_TRK2);
  end
endmodule
