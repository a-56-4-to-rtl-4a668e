`timescale 1ps/1fs
// sigma_delta: programmable 1st/2nd-order SigmaDelta dither modulator.
//
// Converts a fractional tuning word into a stream of integer dither values
// whose average equals the fraction, at the dithering rate CKV/64. First
// order: a single accumulator whose carry is the output (0 or 1). Second
// order: a MASH 1-1, y = c1 + c2 - c2[k-1], values -1..2, noise pushed to
// higher offsets. The document gives the order choice and the clock; the
// MASH topology is this design's choice. Output registered on clk.
module sigma_delta #(
  parameter int W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              order2,     // 0: 1st order, 1: 2nd order
  input  logic [W-1:0]      frac,
  output logic signed [2:0] dout
);
  logic [W-1:0] acc1, acc2;
  logic [W:0]   s1, s2;
  logic         c2_d;

  always_comb begin
    s1 = {1'b0, acc1} + {1'b0, frac};
    s2 = {1'b0, acc2} + {1'b0, s1[W-1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc1 <= '0; acc2 <= '0; c2_d <= 1'b0; dout <= '0;
    end else begin
      acc1 <= s1[W-1:0];
      if (order2) begin
        acc2 <= s2[W-1:0];
        c2_d <= s2[W];
        dout <= 3'(s1[W]) + 3'(s2[W]) - 3'(c2_d);
      end else begin
        acc2 <= '0;
        c2_d <= 1'b0;
        dout <= 3'(s1[W]);
      end
    end
  end
endmodule
