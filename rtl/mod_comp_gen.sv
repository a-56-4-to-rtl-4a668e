`timescale 1ps/1fs
// mod_comp_gen: reference-side compensation path of the two-point FMCW
// modulator.
//
// At every CKR edge a frequency step of k_mod / f_R / 32 (in FCW units, i.e.
// 2 BW / (T_mod f_R) per reference cycle scaled to the CKV/32 loop) is added
// to, or on the down-ramp subtracted from, a ramp accumulator whose value is
// added to the channel FCW. The ramp reverses every n_half CKR cycles, so
// the compensation traces the same triangle as the direct path and the
// modulation does not disturb the phase error. The step has COMP_XF
// fractional bits beyond the FCW format so that slow chirps are represented;
// the output is the accumulator truncated to the FCW format. The document
// gives the step and its rate; the formats and direction counter are this
// design's choices. Registered on CKR; idle (zero) while mod_en is low.
module mod_comp_gen
  import adpll_pkg::*;
(
  input  logic                    ckr,
  input  logic                    rst_n,
  input  logic                    mod_en,
  input  logic [31:0]             step,      // FCW units, PH_FRAC+COMP_XF fraction bits
  input  logic [23:0]             n_half,    // CKR cycles per half period
  output logic signed [FCW_W-1:0] comp,
  output logic                    up
);
  localparam int AW = FCW_W + COMP_XF;
  logic signed [AW-1:0] acc;
  logic [23:0]          hcnt;
  logic                 run;

  assign comp = FCW_W'(acc >>> COMP_XF);

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; hcnt <= '0; up <= 1'b1; run <= 1'b0;
    end else if (!mod_en) begin
      acc <= '0; hcnt <= '0; up <= 1'b1; run <= 1'b0;
    end else begin
      run  <= 1'b1;
      if (run) begin
        acc  <= up ? acc + AW'(step) : acc - AW'(step);
        hcnt <= (hcnt == n_half - 24'd1) ? '0 : hcnt + 24'd1;
        if (hcnt == n_half - 24'd1) up <= !up;
      end
    end
  end
endmodule
