// Carry save adder: WIDTH full adders side by side, no carry between them.
//
// sum(i) = a(i) ^ b(i) ^ c(i) and carry(i) = majority(a(i), b(i), c(i)); the
// carry word is returned already moved one place up, so carry + sum = a + b + c
// modulo 2^WIDTH (the carry out of the top bit is dropped, as the adder tree
// works modulo 2^WIDTH). The pair (carry, sum) is a delayed-carry integer.
// Combinational.
module csa #(
  parameter int unsigned WIDTH = 2052
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);

  logic [WIDTH-1:0] maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[WIDTH-2:0], 1'b0};
  end

endmodule
