// tdc_model: behavioural model of the time-to-digital converter
// (not synthesizable; the real part is a pseudo-differential inverter delay
// chain sampled by FREF).
//
// At each rising FREF edge it reports the time elapsed since the last rising
// CKV/32 edge, quantized to the inverter delay T_RES (12.2 ps, the document's
// measured average resolution) and saturated to the chain length. It also
// reports the last full CKV/32 period in delays, which the chain measures
// from the two edges it holds and which the TDC gain calibration averages.
// Outputs change at the FREF edge and are held until the next one.
`timescale 1ps/1fs
module tdc_model
  import adpll_pkg::*;
#(
  parameter real T_RES = 12.2    // ps per delay stage
) (
  input  logic             fref,
  input  logic             ckv32,
  output logic [TDC_W-1:0] tdc_code,
  output logic [TDC_W-1:0] period_code
);
  real t_rise, t_prev;

  function automatic logic [TDC_W-1:0] quant(real t);
    int q;
    q = int'($floor(t / T_RES));
    if (q < 0)               return '0;
    if (q > (1<<TDC_W) - 1)  return '1;
    return TDC_W'(q);
  endfunction

  initial begin
    t_rise = 0.0; t_prev = 0.0;
    tdc_code = '0; period_code = '0;
  end

  always @(posedge ckv32) begin
    t_prev <= t_rise;
    t_rise <= $realtime;
  end

  always @(posedge fref) begin
    tdc_code    <= quant($realtime - t_rise);
    period_code <= quant(t_rise - t_prev);
  end
endmodule
