// Parallel Booth multiplier: p = x * y for W-bit unsigned operands.
//
// The partial product generator turns the multiplier x into W/2+1 radix-4
// Booth rows of the multiplicand y, each aligned and sign-prepared so that
// their sum modulo 2^(2W) is the product; the partial product adder sums them
// with a tree of seven-input cells. There is no register inside: the whole
// path is combinational and the surrounding controller waits for it to
// settle. W must be even.
module booth_multiplier #(
  parameter int unsigned W = 1026
) (
  input  logic [W-1:0]   x,  // multiplier
  input  logic [W-1:0]   y,  // multiplicand
  output logic [2*W-1:0] p
);

  localparam int unsigned K = W / 2 + 1;

  logic [K-1:0][2*W-1:0] pp;

  ppg #(.W(W), .K(K)) u_ppg (
    .x  (x),
    .y  (y),
    .pp (pp)
  );

  pp_adder #(.COUNT(K), .WIDTH(2*W)) u_adder (
    .pp  (pp),
    .sum (p)
  );

endmodule
