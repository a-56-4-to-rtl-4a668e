`timescale 1ps/1fs
// tdc_normalizer: converts the TDC delay count into the fractional phase
// epsilon[k] and derives the FREF retiming edge selection.
//
// The TDC reports how many inverter delays have elapsed between the last
// rising CKV/32 edge and the FREF edge. Multiplying by 1/K_TDC (the inverse of
// the CKV/32 period in delays, unsigned Q0.20, from tdc_gain_cal) gives epsilon
// as a fraction of one CKV/32 period, saturated just below 1. The document
// states the 1/K_TDC multiplier and that SEL_EDGE is derived from the TDC delay
// chain to pick the retiming path farthest from the metastable region; the
// rule used here (falling-edge path when epsilon < 1/4 or >= 3/4, i.e. when
// the FREF edge lies within a quarter period of a rising CKV/32 edge) is this
// design's choice. Purely combinational.
module tdc_normalizer
  import adpll_pkg::*;
(
  input  logic [TDC_W-1:0]   tdc_code,   // elapsed delays since last CKV/32 rise
  input  logic [INVK_W-1:0]  inv_ktdc,   // 1/K_TDC, Q0.20 per delay
  output logic [PH_FRAC-1:0] eps,        // fractional variable phase, Q0.20
  output logic               sel_edge    // 1: use the falling-edge retiming path
);
  logic [TDC_W+INVK_W-1:0] prod;
  assign prod = tdc_code * inv_ktdc;

  always_comb begin
    if (prod >= (TDC_W+INVK_W)'(1 << PH_FRAC)) eps = '1;
    else                                       eps = prod[PH_FRAC-1:0];
    sel_edge = (eps[PH_FRAC-1:PH_FRAC-2] == 2'b00) || (eps[PH_FRAC-1:PH_FRAC-2] == 2'b11);
  end
endmodule
