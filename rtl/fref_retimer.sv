`timescale 1ps/1fs
// fref_retimer: metastability-aware retiming of FREF into the DCO clock
// domain, producing the system clock CKR.
//
// FREF is sampled in two parallel two-stage paths: one clocked on rising
// CKV/32 edges, one whose first stage uses falling CKV/32 edges. SEL_EDGE
// (from the TDC) selects the path whose first sampling edge is farthest from
// the FREF transition. The selected path yields 'capture', a one-CKV/32-cycle
// pulse at the rising edge of retimed FREF, used to capture the variable-
// phase counter. The selected signal is resampled by CKV/128 to give CKR, so
// CKR is always aligned to the modulation clock CKM and the two domains need
// no rate converter. Dual-edge oversampling, SEL_EDGE and CKV/128 resampling
// are the document's; the number of stages per path is this design's
// choice. Latency: capture appears on the 2nd rising CKV/32 edge after FREF
// (rising path), or on the 1st or 2nd (falling path, epsilon < or >= 1/2).
module fref_retimer (
  input  logic ckv32,
  input  logic ckv128,
  input  logic rst_n,
  input  logic fref,
  input  logic sel_edge,
  output logic capture,     // CKV/32 domain pulse
  output logic ckr          // retimed reference clock
);
  logic r1, r2, f1, f2, sel_d;
  logic ckv32_n;
  assign ckv32_n = ~ckv32;

  always_ff @(posedge ckv32 or negedge rst_n) begin
    if (!rst_n) begin r1 <= 1'b0; r2 <= 1'b0; end
    else        begin r1 <= fref; r2 <= r1;   end
  end
  always_ff @(posedge ckv32_n or negedge rst_n) begin
    if (!rst_n) f1 <= 1'b0;
    else        f1 <= fref;
  end

  logic fsel;
  assign fsel = sel_edge ? f2 : r2;

  always_ff @(posedge ckv32 or negedge rst_n) begin
    if (!rst_n) begin f2 <= 1'b0; sel_d <= 1'b0; capture <= 1'b0; end
    else begin
      f2      <= f1;
      sel_d   <= fsel;
      capture <= 1'b0;
      if ((sel_edge ? f1 : r1) && !fsel) capture <= 1'b1;
    end
  end

  always_ff @(posedge ckv128 or negedge rst_n) begin
    if (!rst_n) ckr <= 1'b0;
    else        ckr <= sel_d;
  end
endmodule
