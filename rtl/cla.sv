// Carry look-ahead adder: s = a + b + cin, cout = carry out of the top bit.
//
// Every bit position gives a generate G(i) = a(i) & b(i) and a propagate
// P(i) = a(i) | b(i). All carries are formed from these before any sum bit:
//   C(i+1) = G(i) + P(i) G(i-1) + P(i) P(i-1) G(i-2) + ... + P(i)..P(0) C(0)
// The expansion is evaluated as a parallel-prefix network (Kogge-Stone): in
// log2(WIDTH) levels each position combines its (G, P) span with the span
// d places below, so the carry into every bit is ready after the same depth.
// Then s(i) = a(i) ^ b(i) ^ C(i). Combinational.
module cla #(
  parameter int unsigned WIDTH = 1026
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned LEVELS = $clog2(WIDTH + 1);

  // Position 0 of the prefix vectors stands for the carry-in; position i+1 for bit i.
  logic [WIDTH:0] g_lvl [LEVELS+1];
  logic [WIDTH:0] p_lvl [LEVELS+1];
  logic [WIDTH:0] carry;  // carry(i) = carry into bit i, carry(WIDTH) = cout

  always_comb begin
    g_lvl[0] = {a & b, cin};
    p_lvl[0] = {a | b, 1'b0};
    for (int l = 0; l < LEVELS; l++) begin
      g_lvl[l+1] = g_lvl[l] | (p_lvl[l] & (g_lvl[l] << (1 << l)));
      p_lvl[l+1] = p_lvl[l] & (p_lvl[l] << (1 << l));
    end
    carry = g_lvl[LEVELS];
    s     = a ^ b ^ carry[WIDTH-1:0];
    cout  = carry[WIDTH];
  end

endmodule
