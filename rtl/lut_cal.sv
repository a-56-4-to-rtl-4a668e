`timescale 1ps/1fs
// lut_cal: computes and stores one linearization-table entry per (CB, MB)
// index from the measured bank-switchover tuning words.
//
// For each index (c, m) a calibration run measures, in closed loop, the
// FB_Mod word at the lower switchover point FB_min(c, m), at the upper one
// FB_max(c, m), and the number of CKM cycles dn(c, m) the programmed ramp
// needs to go from one to the other. The table keeps FB_min, FB_max and the
// average step per CKM cycle FB_step = (FB_max - FB_min) / dn. This block
// takes one (index, FB_min, FB_max, dn) record through a valid/ready
// handshake, forms the difference (Q6.10), scales it to the step format
// (STEP_FRAC fraction bits), adds dn/2 so the quotient rounds to nearest,
// divides with a sequential divider, saturates the step to 16 bits and issues
// one write of the complete entry to the table SRAMs.
// Timing: in_ready is high while idle; a record accepted in cycle t is
// written (tbl_we high for one cycle) in cycle t + 35. FB_max below FB_min
// gives a zero step, and dn = 0 gives the largest step.
// The three stored quantities and the step formula are the document's; the
// handshake, the rounding, the saturation and the division by a divider of
// its own (rather than the shared one) are this design's choices. How the
// switchover words are searched (locking at the middle of the bank overlap
// with each of the two neighbouring bank settings) is done by the loop and
// the controlling software and is not part of this block.
module lut_cal
  import adpll_pkg::*;
(
  input  logic              clk,        // CKM
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [LUT_AW-1:0] in_idx,
  input  logic [LUT_DW-1:0] in_fb_min,  // Q6.10
  input  logic [LUT_DW-1:0] in_fb_max,  // Q6.10
  input  logic [23:0]       in_dn,      // CKM cycles between the two points
  output logic              tbl_we,
  output logic [LUT_AW-1:0] tbl_addr,
  output lut_entry_t        tbl_data
);
  localparam int SH = STEP_FRAC - FBM_FRAC_W;

  typedef enum logic [1:0] {S_IDLE, S_START, S_DIV, S_WRITE} state_e;
  state_e state;

  logic [LUT_AW-1:0] idx_q;
  logic [LUT_DW-1:0] min_q, max_q;
  logic [23:0]       dn_q;
  logic [31:0]       num;
  logic              dv_start, dv_busy, dv_done;
  logic [31:0]       dv_quot;
  logic [23:0]       dv_rem;

  always_comb begin
    if (max_q > min_q) num = (32'(max_q - min_q) << SH) + 32'(dn_q >> 1);
    else               num = '0;
  end

  assign dv_start = (state == S_START);

  arith_divider #(.NW(32), .DW(24)) u_div (
    .clk, .rst_n, .start(dv_start), .num, .den(dn_q),
    .busy(dv_busy), .done(dv_done), .quot(dv_quot), .rem(dv_rem)
  );

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; idx_q <= '0; min_q <= '0; max_q <= '0; dn_q <= '0;
      tbl_we <= 1'b0; tbl_addr <= '0; tbl_data <= '0;
    end else begin
      tbl_we <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          idx_q <= in_idx; min_q <= in_fb_min; max_q <= in_fb_max; dn_q <= in_dn;
          state <= S_START;
        end
        S_START: state <= S_DIV;
        S_DIV: if (dv_done) state <= S_WRITE;
        S_WRITE: begin
          tbl_we           <= 1'b1;
          tbl_addr         <= idx_q;
          tbl_data.fb_min  <= min_q;
          tbl_data.fb_max  <= max_q;
          tbl_data.fb_step <= (dv_quot > 32'(16'hFFFF)) ? 16'hFFFF : dv_quot[15:0];
          state            <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
