`timescale 1ps/1fs
// tdc_gain_cal: TDC gain (K_TDC) calibration by digital averaging.
//
// After 'start' it sums 2^log2n readings of the CKV/32 period measured by the
// TDC in inverter delays (one per CKR cycle), then divides 2^(PH_FRAC+log2n)
// by the sum on the shared divider, giving 1/K_TDC = 2^PH_FRAC / T_V in delay
// units (unsigned Q0.20 per delay), which the TDC normalizer applies. The
// averaging removes the quantization of single readings. The document states
// that the TDC gain is calibrated automatically by averaging; the sequence and
// formats are this design's choices. inv_ktdc keeps its reset value INV_INIT
// until the first calibration completes; 'done' pulses when it updates.
module tdc_gain_cal
  import adpll_pkg::*;
#(
  parameter logic [INVK_W-1:0] INV_INIT = INVK_W'(24000)  // ~ 1/(43.7 delays)
) (
  input  logic              ckr,
  input  logic              rst_n,
  input  logic              start,
  input  logic [3:0]        log2n,        // number of readings = 2^log2n (<= 10)
  input  logic [TDC_W-1:0]  period_code,
  output logic              busy,
  output logic              done,
  output logic [INVK_W-1:0] inv_ktdc
);
  typedef enum logic [1:0] {C_IDLE, C_ACC, C_DIV, C_WAIT} cst_e;
  cst_e        st;
  logic [15:0] sum;
  logic [10:0] n;
  logic        dv_start, dv_busy, dv_done;
  logic [31:0] dv_quot;
  logic [15:0] dv_rem;

  arith_divider #(.NW(32), .DW(16)) u_div (
    .clk(ckr), .rst_n, .start(dv_start), .num(32'(1) << (PH_FRAC + int'(log2n))),
    .den(sum), .busy(dv_busy), .done(dv_done), .quot(dv_quot), .rem(dv_rem)
  );

  assign busy     = (st != C_IDLE);
  assign dv_start = (st == C_DIV);

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; sum <= '0; n <= '0; inv_ktdc <= INV_INIT; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin st <= C_ACC; sum <= '0; n <= '0; end
        C_ACC: begin
          sum <= sum + 16'(period_code);
          n   <= n + 1'b1;
          if (n == (11'(1) << log2n) - 11'd1) st <= C_DIV;
        end
        C_DIV: st <= C_WAIT;
        C_WAIT: if (dv_done) begin
          inv_ktdc <= (dv_quot > 32'((1 << INVK_W) - 1)) ? '1 : dv_quot[INVK_W-1:0];
          done     <= 1'b1;
          st       <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
