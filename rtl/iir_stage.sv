`timescale 1ps/1fs
// iir_stage: one first-order IIR low-pass section of the loop filter.
//
// y[k] = y[k-1] + 2^-lambda_sh * (x[k] - y[k-1]), a multiplier-free
// exponential smoother. When en is low the state follows the input, so the
// section is bypassed and can be switched in later without a step at its
// output (hitless gear shifting). Four of these in cascade form the 4th-order
// IIR of the loop filter. The shift-based coefficient is this design's choice;
// the document names a 4th-order IIR without its coefficients.
module iir_stage #(
  parameter int W = 40
) (
  input  logic                ckr,
  input  logic                rst_n,
  input  logic                en,
  input  logic [3:0]          lambda_sh,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y      // combinational view of the output
);
  logic signed [W-1:0] st;
  logic signed [W-1:0] dlt;

  always_comb begin
    dlt = x - st;
    y   = en ? st + (dlt >>> lambda_sh) : x;
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) st <= '0;
    else        st <= y;
  end
endmodule
