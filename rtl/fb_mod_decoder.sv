`timescale 1ps/1fs
// fb_mod_decoder: thermometer decoder of the FB_Mod integer tuning word.
//
// FB_Mod is a unit-weighted bank in the centre of the fine bank. In state 0
// its upper half is ON and its lower half OFF; a word k turns on the top k
// cells, so cells switch monotonically and each has one defined neighbour
// pattern. The default half-ON state and monotonic control are the
// document's; filling from the top (next to the ON cells of FB_Loop1) is read
// from its decoding figure. Words above N saturate. Combinational; bit 0 is
// the bottom cell.
module fb_mod_decoder
  import adpll_pkg::*;
#(
  parameter int N = FBM_BITS
) (
  input  logic [FBM_INT_W-1:0] k,
  output logic [N-1:0]         fb_mod
);
  always_comb begin
    for (int j = 0; j < N; j++)
      fb_mod[j] = (int'(k) >= N - j);
  end
endmodule
