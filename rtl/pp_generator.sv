// Partial product row generator for one Booth digit.
//
// Each output bit j (0..M_W) is an and-or-xor cell:
//   pp[j] = ((sy & y[j]) | (s2y & y[j-1])) ^ s,  with y[-1] = y[M_W] = 0,
// i.e. |digit| * Y, complemented when the digit is negative. One more bit on
// top carries the inverted sign ~s, used by the sign-extension scheme of the
// partial product generator. The +1 that completes the two's complement of a
// negative row is not added here; the caller places it in a free bit of the
// next row. Combinational; output width M_W+2.
module pp_generator
  import modmul_pkg::*;
#(
  parameter int unsigned M_W = 1026  // multiplicand width
) (
  input  logic [M_W-1:0] y,
  input  booth_sel_t     sel,
  output logic [M_W+1:0] pp
);

  logic [M_W:0] y1;  // Y
  logic [M_W:0] y2;  // 2Y

  always_comb begin
    y1 = {1'b0, y};
    y2 = {y, 1'b0};
    pp = {~sel.s, ((y1 & {(M_W+1){sel.sy}}) | (y2 & {(M_W+1){sel.s2y}})) ^ {(M_W+1){sel.s}}};
  end

endmodule
