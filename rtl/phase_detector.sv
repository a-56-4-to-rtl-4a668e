`timescale 1ps/1fs
// phase_detector: synchronous arithmetic phase detector.
//
// phi_E[k] = Rr[k] - Rv[k] - epsilon[k], evaluated at each CKR edge in the
// fixed-point phase format (PH_INT integer, PH_FRAC fractional bits) and
// interpreted as a signed two's-complement number, so that the modulo-2^PH_INT
// wrap of both accumulators cancels. The signs follow the block diagram.
// Rv is corrected by one count when the falling-edge retiming path was used
// and epsilon < 1/2: that path then captures the counter one CKV/32 edge
// earlier than the rising-edge path (this correction is this design's own,
// needed by its retimer; see fref_retimer). The corrected variable phase is
// also output for frequency measurement. Outputs registered on CKR.
module phase_detector
  import adpll_pkg::*;
(
  input  logic                    ckr,
  input  logic                    rst_n,
  input  logic [PH_W-1:0]         rr,
  input  logic [PH_INT-1:0]       rv,
  input  logic [PH_FRAC-1:0]      eps,
  input  logic                    sel_edge,
  output logic signed [PH_W-1:0]  phe,
  output logic [PH_W-1:0]         phv        // variable phase Rv + epsilon
);
  logic [PH_INT-1:0] rv_c;
  logic [PH_W-1:0]   diff;

  always_comb begin
    rv_c = rv + PH_INT'(sel_edge && !eps[PH_FRAC-1]);
    diff = rr - {rv_c, {PH_FRAC{1'b0}}} - PH_W'(eps);
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      phe <= '0;
      phv <= '0;
    end else begin
      phe <= signed'(diff);
      phv <= {rv_c, eps};
    end
  end
endmodule
