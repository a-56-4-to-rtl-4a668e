`timescale 1ps/1fs
// divider_chain: divide-by-32 prescaler and derived clocks of the ADPLL.
//
// In silicon the /32 is an injection-locked /2 at 60 GHz, a CML /2, a CML /4
// and a CMOS /2; here each stage is an ideal toggle flip-flop clocked by the
// previous stage (ripple), which has the same logical behaviour. Beyond
// CKV/32 the chain provides CKV/64 (SigmaDelta dithering clock), CKV/128
// (CKR resampling and fastest modulation clock), and CKV/256, /512, /1024.
// The modulation clock CKM is selected by sel_mod: 00 -> CKV/128,
// 01 -> CKV/256, 10 -> CKV/512, 11 -> CKV/1024, as in the document's
// multi-rate diagram. sel_mod is a static setting; change it only while the
// modulator is idle.
module divider_chain (
  input  logic       ckv,
  input  logic       rst_n,
  input  logic [1:0] sel_mod,
  output logic       ckv32,
  output logic       ckv64,
  output logic       ckv128,
  output logic       ckm
);
  // d[i] = CKV / 2^(i+1)
  logic [9:0] d;
  logic [9:0] src;
  assign src = {d[8:0], ckv};

  for (genvar i = 0; i < 10; i++) begin : g_div
    logic q;
    always_ff @(posedge src[i] or negedge rst_n) begin
      if (!rst_n) q <= 1'b0;
      else        q <= ~q;
    end
    assign d[i] = q;
  end

  assign ckv32  = d[4];
  assign ckv64  = d[5];
  assign ckv128 = d[6];

  always_comb begin
    unique case (sel_mod)
      2'b00: ckm = d[6];
      2'b01: ckm = d[7];
      2'b10: ckm = d[8];
      default: ckm = d[9];
    endcase
  end
endmodule
