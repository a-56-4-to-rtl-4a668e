`timescale 1ps/1fs
// fmcw_direct_path: CKM-rate direct modulation path of the multi-rate
// two-point FMCW modulator.
//
// The linearization table holds, for each (CB,MB) index i = {c,m}, the FB_Mod
// tuning words at the lower and upper bank-switchover points, FB_min(i) and
// FB_max(i), and the average FB_Mod increment per CKM cycle, FB_step(i). On
// an up-ramp the FB_Mod word is FB_min(i) plus an accumulator that adds
// FB_step every CKM; when it exceeds FB_max(i) a bank-switchover event moves
// to index i+1, resets the accumulator and restarts from FB_min(i+1). The
// down-ramp mirrors this (subtract, compare with FB_min, restart from
// FB_max(i-1)). A small state machine prefetches the neighbouring table entry
// in the ramp direction from the SRAMs (MB counts 0..mb_last within a CB
// code, then CB steps) so that it is ready before the
// switchover. The ramp direction reverses every n_half CKM cycles (triangular
// chirp). The accumulate / compare / reload structure follows the document;
// the prefetch protocol, the direction counter and number formats are this
// design's choices.
// Formats: FB_min/FB_max Q6.10 FB LSBs, FB_step Q0.16; outputs are
// registered on CKM. While mod_en is low the path is idle and outputs the
// index start_idx with FB_Mod at the centre of its bank.
module fmcw_direct_path
  import adpll_pkg::*;
(
  input  logic                  ckm,
  input  logic                  rst_n,
  input  logic                  mod_en,
  input  logic [LUT_AW-1:0]     start_idx,   // lowest index of the chirp
  input  logic [LUT_AW-1:0]     end_idx,     // highest index of the chirp
  input  logic [MB_W-1:0]       mb_last,     // last MB code used before CB steps
  input  logic [23:0]           n_half,      // CKM cycles per half period
  // table read port (three SRAMs read together, one cycle latency)
  output logic                  lut_rd,
  output logic [LUT_AW-1:0]     lut_addr,
  input  lut_entry_t            lut_data,
  // tuning words
  output logic [CB_W-1:0]       cb,
  output logic [MB_W-1:0]       mb,
  output logic [FBM_INT_W-1:0]  fbm_int,
  output logic [FBM_FRAC_W-1:0] fbm_frac,
  output logic                  up,          // ramp direction
  output logic                  switch_evt,  // bank-switchover this cycle
  output logic                  turn_evt,    // ramp reversal this cycle
  output logic                  running
);
  localparam int XF  = STEP_FRAC - FBM_FRAC_W;      // extra fraction bits (6)
  localparam int FBW = FBM_INT_W + STEP_FRAC + 2;   // signed FB_Mod word

  typedef enum logic [1:0] {S_IDLE, S_RD, S_LD, S_RUN} st_e;
  typedef enum logic [1:0] {P_ISSUE, P_WAIT, P_DONE} pf_e;

  st_e                    st;
  pf_e                    pf;
  lut_entry_t             cur, nxt;
  logic [LUT_AW-1:0]      idx;
  logic signed [FBW-1:0]  base, acc, fb, fb_o, cmax, cmin;
  logic [23:0]            hcnt;
  logic                   at_top, at_bot, evt_up, evt_dn, turn;

  // Neighbouring (CB,MB) index along the tuning curve: MB runs 0..mb_last
  // within one CB code, then CB steps and MB restarts from 0.
  function automatic logic [LUT_AW-1:0] step_idx(logic [LUT_AW-1:0] i, logic dir_up);
    logic [CB_W-1:0] c;
    logic [MB_W-1:0] m;
    {c, m} = i;
    if (dir_up) return (m >= mb_last) ? {c + 1'b1, MB_W'(0)} : {c, m + 1'b1};
    else        return (m == '0)      ? {c - 1'b1, mb_last}  : {c, m - 1'b1};
  endfunction

  function automatic logic signed [FBW-1:0] ext(logic [LUT_DW-1:0] w);
    return FBW'({w, {XF{1'b0}}});
  endfunction

  always_comb begin
    fb     = base + acc;
    cmax   = ext(cur.fb_max);
    cmin   = ext(cur.fb_min);
    at_top = (idx == end_idx);
    at_bot = (idx == start_idx);
    turn   = (st == S_RUN) && (hcnt == n_half - 24'd1);
    evt_up = (st == S_RUN) && up  && !turn && (fb > cmax) && !at_top && (pf == P_DONE);
    evt_dn = (st == S_RUN) && !up && !turn && (fb < cmin) && !at_bot && (pf == P_DONE);
    // word sent to the bank: at a switchover already the new entry's start
    fb_o = evt_up ? ext(nxt.fb_min) : evt_dn ? ext(nxt.fb_max) : fb;
    // table address: the start entry, then the neighbour in the ramp direction
    lut_addr = (st == S_IDLE) ? start_idx : step_idx(idx, up);
    lut_rd   = (st == S_IDLE && mod_en) || (st == S_RUN && pf == P_ISSUE);
  end

  always_ff @(posedge ckm or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pf <= P_DONE; cur <= '0; nxt <= '0; idx <= '0;
      base <= '0; acc <= '0; hcnt <= '0; up <= 1'b1;
      cb <= '0; mb <= '0; fbm_int <= '0; fbm_frac <= '0;
      switch_evt <= 1'b0; turn_evt <= 1'b0; running <= 1'b0;
    end else begin
      switch_evt <= evt_up || evt_dn;
      turn_evt   <= turn;
      unique case (st)
        S_IDLE: begin
          running <= 1'b0;
          idx     <= start_idx;
          up      <= 1'b1;
          hcnt    <= '0;
          {cb, mb} <= start_idx;
          fbm_int  <= FBM_INT_W'(FBM_BITS / 2);
          fbm_frac <= '0;
          if (mod_en) st <= S_RD;          // read of start entry issued now
        end
        S_RD: st <= S_LD;                  // read data valid in this cycle
        S_LD: begin
          cur  <= lut_data;
          base <= ext(lut_data.fb_min);
          acc  <= '0;
          pf   <= P_ISSUE;
          st   <= S_RUN;
          running <= 1'b1;
        end
        S_RUN: begin
          hcnt <= turn ? '0 : hcnt + 24'd1;
          // prefetch of the neighbouring entry
          unique case (pf)
            P_ISSUE: pf <= P_WAIT;
            P_WAIT:  begin nxt <= lut_data; pf <= P_DONE; end
            default: ;
          endcase
          if (evt_up) begin
            idx <= step_idx(idx, 1'b1); cur <= nxt; base <= ext(nxt.fb_min);
            acc <= FBW'(nxt.fb_step);
            pf  <= P_ISSUE;
          end else if (evt_dn) begin
            idx <= step_idx(idx, 1'b0); cur <= nxt; base <= ext(nxt.fb_max);
            acc <= -FBW'(nxt.fb_step);
            pf  <= P_ISSUE;
          end else begin
            acc <= up ? acc + FBW'(cur.fb_step) : acc - FBW'(cur.fb_step);
          end
          if (turn) begin
            up <= !up;
            pf <= P_ISSUE;                 // fetch the neighbour on the other side
          end
          {cb, mb} <= evt_up ? step_idx(idx, 1'b1) : evt_dn ? step_idx(idx, 1'b0) : idx;
          if (fb_o < 0) begin
            fbm_int <= '0; fbm_frac <= '0;
          end else begin
            fbm_int  <= fb_o[STEP_FRAC +: FBM_INT_W];
            fbm_frac <= fb_o[XF +: FBM_FRAC_W];
          end
          if (!mod_en) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
