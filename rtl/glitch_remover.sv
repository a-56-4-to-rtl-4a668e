`timescale 1ps/1fs
// glitch_remover: phase-error glitch removal and clock-quality monitor.
//
// A timing skew between the counter and TDC sampling moments can produce
// one-cycle jumps of a whole CKV/32 period in phi_E. Each CKR cycle the
// magnitude of phi_E[k] - phi_E[k-1] is compared with 0.5; when it is larger
// and tracking is on, the output keeps its previous value for that cycle
// (phe_freeze). A second comparator against a programmable threshold gives a
// clock-quality / lock monitor flag. This follows the document's glitch
// removal circuit; combining the 0.5 comparator with track_on so that both
// must hold is this design's reading. Registered output, one CKR latency.
module glitch_remover
  import adpll_pkg::*;
(
  input  logic                    ckr,
  input  logic                    rst_n,
  input  logic signed [PH_W-1:0]  phe_in,
  input  logic                    track_on,
  input  logic [PH_W-1:0]         qm_threshold,   // monitor threshold, Q12.20
  output logic signed [PH_W-1:0]  phe_out,
  output logic                    phe_freeze,     // glitch detected this cycle
  output logic                    clk_quality_bad // |dphi_E| > qm_threshold
);
  localparam logic [PH_W-1:0] HALF = PH_W'(1) << (PH_FRAC - 1);

  logic signed [PH_W-1:0] phe_prev;
  logic signed [PH_W:0]   dphe;
  logic        [PH_W:0]   dmag;

  always_comb begin
    dphe            = (PH_W+1)'(phe_in) - (PH_W+1)'(phe_prev);
    dmag            = dphe[PH_W] ? (PH_W+1)'(-dphe) : (PH_W+1)'(dphe);
    phe_freeze      = track_on && (dmag > (PH_W+1)'(HALF));
    clk_quality_bad = dmag > (PH_W+1)'(qm_threshold);
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      phe_prev <= '0;
      phe_out  <= '0;
    end else begin
      phe_prev <= phe_in;
      if (!phe_freeze) phe_out <= phe_in;
    end
  end
endmodule
