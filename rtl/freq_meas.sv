`timescale 1ps/1fs
// freq_meas: averaged frequency measurement from the ADPLL's own counter.
//
// Sums the per-cycle advance of the variable phase (Rv + epsilon, in CKV/32
// periods) over 2^log2n CKR cycles and divides by the count, giving the mean
// CKV/32 frequency in FCW units (multiples of f_R, PH_FRAC fractional bits).
// Differences are taken modulo 2^PH_INT so the counter wrap does not matter.
// Averaging many readings reduces the quantization and phase-noise error of
// one reading. Two measurements taken with one tuning cell forced ON and then
// OFF (open loop) give that cell's frequency step, which is how the dither
// cell mismatch eps and the bank tuning curves are characterised. The
// document gives the principle; formats and sequencing are this design's.
module freq_meas
  import adpll_pkg::*;
(
  input  logic                ckr,
  input  logic                rst_n,
  input  logic                start,
  input  logic [3:0]          log2n,    // <= 12
  input  logic [PH_W-1:0]     phv,      // variable phase from the phase detector
  output logic                busy,
  output logic                done,
  output logic [PH_W-1:0]     freq      // mean FCW, Q12.20
);
  localparam int SW = PH_W + 12;
  logic [SW-1:0]   sum;
  logic [PH_W-1:0] prev, dphi;
  logic [12:0]     n;
  logic            first;

  assign dphi = phv - prev;

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0; prev <= '0; n <= '0; busy <= 1'b0; done <= 1'b0; freq <= '0; first <= 1'b0;
    end else begin
      done <= 1'b0;
      prev <= phv;
      if (start && !busy) begin
        busy <= 1'b1; sum <= '0; n <= '0; first <= 1'b1;
      end else if (busy) begin
        first <= 1'b0;
        if (!first) begin
          sum <= sum + SW'(dphi);
          n   <= n + 1'b1;
          if (n == (13'(1) << log2n) - 13'd1) begin
            busy <= 1'b0;
            done <= 1'b1;
            freq <= PH_W'((sum + SW'(dphi)) >> log2n);
          end
        end
      end
    end
  end
endmodule
