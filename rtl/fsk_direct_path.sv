`timescale 1ps/1fs
// fsk_direct_path: reference-rate two-point FSK modulation using FB_Mod.
//
// A binary symbol selects a frequency deviation of +dev or -dev (FCW units).
// The same deviation feeds both points of the two-point modulator: it is
// added to the channel FCW (reference / compensation point) and, multiplied
// by gain = 32 f_R / K_DCO(FB_Mod) (the f_R/K_DCO normalization multiplier,
// FB LSBs per FCW unit, unsigned Q12.4), it offsets the FB_Mod tuning word
// around the centre of the bank (direct point). With an exact gain the loop
// sees no phase error and the modulation response is flat. The document uses
// this path with an FSK test signal; the formats are this design's choices.
// Registered on CKR; outputs the bank centre and zero deviation when fsk_en
// is low.
module fsk_direct_path
  import adpll_pkg::*;
(
  input  logic                    ckr,
  input  logic                    rst_n,
  input  logic                    fsk_en,
  input  logic                    data,
  input  logic [FCW_W-1:0]        dev,       // deviation, FCW units Q8.20
  input  logic [15:0]             gain,      // 32 f_R / K_DCO, Q12.4
  output logic signed [FCW_W-1:0] comp,
  output logic [FBM_INT_W-1:0]    fbm_int,
  output logic [FBM_FRAC_W-1:0]   fbm_frac
);
  localparam int PW = FCW_W + 17;
  localparam logic signed [PW-1:0] CENTRE = PW'(FBM_BITS / 2) <<< (PH_FRAC + 4);
  logic signed [FCW_W-1:0] d;
  logic signed [PW-1:0]    prod, word;

  always_comb begin
    d    = data ? signed'(dev) : -signed'(dev);
    prod = PW'(d) * signed'({1'b0, gain});        // FB LSBs, PH_FRAC+4 fraction bits
    word = CENTRE + prod;
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      comp     <= '0;
      fbm_int  <= FBM_INT_W'(FBM_BITS / 2);
      fbm_frac <= '0;
    end else if (!fsk_en) begin
      comp     <= '0;
      fbm_int  <= FBM_INT_W'(FBM_BITS / 2);
      fbm_frac <= '0;
    end else begin
      comp <= d;
      if (word < 0) begin
        fbm_int <= '0; fbm_frac <= '0;
      end else begin
        fbm_int  <= word[PH_FRAC+4 +: FBM_INT_W];
        fbm_frac <= word[PH_FRAC+4-FBM_FRAC_W +: FBM_FRAC_W];
      end
    end
  end
endmodule
