`timescale 1ps/1fs
// var_phase_counter: integer part Rv of the variable (DCO) phase.
//
// Counts rising edges of CKV/32 in a PH_INT-bit wrap-around counter. In the
// document the counter is a 2-bit asynchronous prescaler followed by a 10-bit
// synchronous counter; here the same 12-bit count is one synchronous counter
// in the CKV/32 domain, which is logically identical. The count is captured
// on the CKV/32 edge at which the retimed reference pulse 'capture' is high,
// and held until the next reference cycle, so that the CKR-domain phase
// detector reads a stable value. Capture timing is this design's choice
// (see fref_retimer).
module var_phase_counter
  import adpll_pkg::*;
(
  input  logic              ckv32,
  input  logic              rst_n,
  input  logic              capture,   // one CKV/32-cycle pulse per reference edge
  output logic [PH_INT-1:0] count,     // free-running count (test output)
  output logic [PH_INT-1:0] rv         // count captured at the reference edge
);
  always_ff @(posedge ckv32 or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      rv    <= '0;
    end else begin
      count <= count + 1'b1;
      if (capture) rv <= count + 1'b1;   // includes the capturing edge
    end
  end
endmodule
