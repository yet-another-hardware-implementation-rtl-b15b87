// Partial product generator (PPG): radix-4 Booth recoding of the multiplier.
//
// The W-bit unsigned multiplier x is cut into K = W/2+1 overlapping bit
// triples {x(2i+1), x(2i), x(2i-1)} with x(-1) = 0 and x(W), x(W+1) = 0; each
// triple drives one booth_recoder, whose outputs select 0, Y or 2Y in one
// pp_generator and complement it for negative digits. Every row leaves here
// already shifted left by 2i and widened to 2W bits, so that the plain sum of
// all K rows, taken modulo 2^(2W), is x*y:
//   row 0          : {~s0, s0, s0, body0}
//   row i, 0<i<K-1 : {1, ~si, bodyi} << 2i, with s(i-1) in bit 2(i-1)
//   row K-1        : bodyK-1 << 2(K-1),      with s(K-2) in bit 2(K-2)
// The prefix bits replace the sign extension of the negative rows; the sign
// bit s(i-1) completes the two's complement of row i-1 and sits in the zero
// gap that the shift leaves below row i. The top digit is never negative
// because x is unsigned, so the last row needs neither prefix nor sign.
// About half of the output bits are constants (the zero gaps below each
// shifted row and the fixed prefix ones); synthesis folds them into the adder.
// W must be even. Combinational.
module ppg
  import modmul_pkg::*;
#(
  parameter int unsigned W = 1026,        // operand width (even)
  parameter int unsigned K = W / 2 + 1    // number of partial products
) (
  input  logic [W-1:0]             x,     // multiplier (register1)
  input  logic [W-1:0]             y,     // multiplicand (register2)
  output logic [K-1:0][2*W-1:0]    pp
);

  localparam int unsigned PW = W + 2;  // width of one generator row

  logic [W+2:0] xe;  // x with x(-1) = 0 below and two zero bits above
  assign xe = {2'b00, x, 1'b0};

  booth_sel_t        sel [K];
  logic [PW-1:0]     row [K];

  for (genvar i = 0; i < K; i++) begin : g_row
    booth_recoder u_br (
      .bits (xe[2*i +: 3]),
      .sel  (sel[i])
    );
    pp_generator #(.M_W(W)) u_gen (
      .y   (y),
      .sel (sel[i]),
      .pp  (row[i])
    );

    logic [2*W+1:0] wide;  // two spare bits, dropped when truncated to 2W
    if (i == 0) begin : g_first
      always_comb begin
        wide = '0;
        wide[PW+1:0] = {~sel[i].s, sel[i].s, sel[i].s, row[i][PW-2:0]};
      end
    end else if (i < K - 1) begin : g_middle
      always_comb begin
        wide = '0;
        wide[2*i +: PW+1] = {1'b1, row[i]};
        wide[2*i-2]       = sel[i-1].s;
      end
    end else begin : g_last
      always_comb begin
        wide = '0;
        wide[2*i +: PW-1] = row[i][PW-2:0];
        wide[2*i-2]       = sel[i-1].s;
      end
    end
    assign pp[i] = wide[2*W-1:0];
  end

endmodule
