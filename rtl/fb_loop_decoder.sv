`timescale 1ps/1fs
// fb_loop_decoder: "virtual dummy" decoder of the loop part of the fine bank.
//
// The fine bank is split into FB_Loop1 (above FB_Mod), FB_Mod (centre) and
// FB_Loop2 (below). In state 0 the lower half of each loop sub-bank is ON and
// the upper half OFF, so the cells next to FB_Mod (lower half of FB_Loop1:
// ON; upper half of FB_Loop2: OFF) match FB_Mod's own edge cells and act as
// dummies. A positive loop word n first turns on the upper half of FB_Loop1
// from its bottom upwards (states +), then the upper half of FB_Loop2 from
// its bottom upwards (states ++). A negative word first turns off the lower
// half of FB_Loop2 from its top downwards (states -), then the lower half of
// FB_Loop1 from its top downwards (states --). The number of ON cells is
// always FBL_BITS + n. The sequence is the document's decoding scheme; bit 0
// of each output is the bottom cell of its sub-bank. Combinational.
module fb_loop_decoder
  import adpll_pkg::*;
#(
  parameter int H = FBL_HALF            // cells per half sub-bank
) (
  input  logic signed [7:0]  n,         // loop word, -2H .. +2H
  output logic [2*H-1:0]     fb_loop1,
  output logic [2*H-1:0]     fb_loop2
);
  always_comb begin
    for (int i = 0; i < H; i++) begin
      fb_loop1[H+i] = (int'(n) >= i + 1);         // upper half of Loop1, first up
      fb_loop2[H+i] = (int'(n) >= H + i + 1);     // upper half of Loop2, second up
      fb_loop2[i]   = (int'(n) > -(H - i));       // lower half of Loop2, first down
      fb_loop1[i]   = (int'(n) > -2*H + i);       // lower half of Loop1, second down
    end
  end
endmodule
