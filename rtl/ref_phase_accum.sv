`timescale 1ps/1fs
// ref_phase_accum: reference-phase accumulator of the ADPLL.
//
// At every rising edge of the retimed reference clock CKR the channel
// frequency command word (FCW = f_CKV / (32 f_R)) plus the modulation
// compensation word of the two-point modulator is added to the reference
// phase Rr[k]. Rr is unsigned fixed point with PH_INT integer and PH_FRAC
// fractional bits and wraps modulo 2^PH_INT, like the variable-phase counter
// it is compared with. The summing node and accumulator follow the document;
// the word widths and the synchronous clear are this design's choices.
// Timing: Rr[k] is registered; the sum of the inputs present at edge k
// appears after edge k. en=0 holds the phase.
module ref_phase_accum
  import adpll_pkg::*;
(
  input  logic                     ckr,
  input  logic                     rst_n,
  input  logic                     clr,      // synchronous restart from 0
  input  logic                     en,
  input  logic [FCW_W-1:0]         fcw,      // channel FCW, unsigned Q8.20
  input  logic signed [FCW_W-1:0]  comp,     // compensation word, signed Q8.20
  output logic [PH_W-1:0]          rr        // reference phase, Q12.20
);
  logic [PH_W-1:0] inc;
  // Zero-extend the FCW, sign-extend the compensation, then add modulo 2^PH_W.
  assign inc = PH_W'(fcw) + PH_W'(comp);

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n)     rr <= '0;
    else if (clr)   rr <= '0;
    else if (en)    rr <= rr + inc;
  end
endmodule
