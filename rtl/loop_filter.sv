`timescale 1ps/1fs
// loop_filter: reconfigurable type-I / type-II digital loop filter with a
// 4th-order IIR section and hitless gear shifting.
//
// The phase error passes through four cascaded first-order IIR sections
// (enabled together by iir_en; bypassed otherwise), then a proportional path
// 2^-alpha_sh and, in type-II mode, an integral path accumulating 2^-rho_sh
// times the same signal. When the proportional gain changes, an offset
// register absorbs the difference so that the output does not jump; the IIR
// sections track their input while disabled so that enabling them is also
// hitless. 'clr' empties the integrator, offset and IIR states (used when the
// loop moves on to the next DCO bank). The structure (IIR4, alpha, rho, sum)
// is the document's; shifts in place of multipliers and the offset-based
// hitless switching are this design's choices.
// Output: signed, PH_FRAC fractional bits, in units of one reference-cycle
// frequency (FCW units); registered, one CKR of latency.
module loop_filter
  import adpll_pkg::*;
(
  input  logic                    ckr,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic signed [PH_W-1:0]  phe,
  input  logic                    type2,
  input  logic                    iir_en,
  input  logic [3:0]              lambda_sh [4],
  input  logic [4:0]              alpha_sh,
  input  logic [4:0]              rho_sh,
  output logic signed [LF_W-1:0]  lf_out
);
  logic signed [LF_W-1:0] s [5];
  logic signed [LF_W-1:0] integ, offset;
  logic [4:0]             alpha_q;
  logic signed [LF_W-1:0] p_old, p_new, integ_n, offset_n;

  assign s[0] = LF_W'(phe);
  for (genvar i = 0; i < 4; i++) begin : g_iir
    iir_stage #(.W(LF_W)) u_iir (
      .ckr, .rst_n, .en(iir_en && !clr), .lambda_sh(lambda_sh[i]),
      .x(s[i]), .y(s[i+1])
    );
  end

  always_comb begin
    p_old    = s[4] >>> alpha_q;
    p_new    = s[4] >>> alpha_sh;
    integ_n  = type2 ? integ + (s[4] >>> rho_sh) : integ;
    offset_n = offset + p_old - p_new;
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      integ   <= '0;
      offset  <= '0;
      alpha_q <= '0;
      lf_out  <= '0;
    end else if (clr) begin
      integ   <= '0;
      offset  <= '0;
      alpha_q <= alpha_sh;
      lf_out  <= '0;
    end else begin
      integ   <= integ_n;
      offset  <= offset_n;
      alpha_q <= alpha_sh;
      lf_out  <= p_new + integ_n + offset_n;
    end
  end
endmodule
