`timescale 1ps/1fs
// arith_divider: shared sequential unsigned divider ("common arithmetic
// divider" of the ADPLL's digital section).
//
// Restoring radix-2 division: after a 'start' pulse it produces
// quot = num / den and rem = num % den in NW clock cycles, one quotient bit
// per cycle, then raises 'done' for one cycle. It serves the calibrations,
// e.g. FB_step = dFB / dn of the linearization table and 1/K_TDC. Division
// by zero returns an all-ones quotient. The document names the divider; the
// algorithm is this design's choice.
module arith_divider #(
  parameter int NW = 32,   // dividend / quotient width
  parameter int DW = 16    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quot,
  output logic [DW-1:0] rem
);
  logic [DW:0]          r;
  logic [NW-1:0]        q;
  logic [DW-1:0]        d;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]          r_sh, r_sub;

  always_comb begin
    r_sh  = {r[DW-1:0], q[NW-1]};
    r_sub = r_sh - {1'b0, d};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; q <= '0; d <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
      quot <= '0; rem <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        r <= '0; q <= num; d <= den; cnt <= '0; busy <= 1'b1;
      end else if (busy) begin
        if (!r_sub[DW]) begin r <= r_sub; q <= {q[NW-2:0], 1'b1}; end
        else            begin r <= r_sh;  q <= {q[NW-2:0], 1'b0}; end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(NW+1))'(NW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (d == '0) begin
            quot <= '1;
            rem  <= '0;
          end else begin
            quot <= !r_sub[DW] ? {q[NW-2:0], 1'b1} : {q[NW-2:0], 1'b0};
            rem  <= !r_sub[DW] ? r_sub[DW-1:0] : r_sh[DW-1:0];
          end
        end
      end
    end
  end
endmodule
