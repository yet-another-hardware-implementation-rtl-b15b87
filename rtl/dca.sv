// Delayed carry adder: adds two delayed-carry integers (a1, b1) and (a2, b2)
// and a plain integer c into one integer, sum = a1 + b1 + a2 + b2 + c modulo
// 2^WIDTH.
//
// The five operands are folded one after another: c, a1, b1 in a first
// carry-save row, then a2 and b2 each in one more carry-save row, which
// leaves a single delayed-carry pair; a last carry-propagate row resolves it.
// Three carry-save rows and one resolving row replace the five half-adder
// rows and the full-adder row of the original cell, whose exact wiring
// relies on a proof not reproduced here; the function is the same.
// Overflow above bit WIDTH-1 is ignored. Combinational.
module dca #(
  parameter int unsigned WIDTH = 2052
) (
  input  logic [WIDTH-1:0] a1,
  input  logic [WIDTH-1:0] b1,
  input  logic [WIDTH-1:0] a2,
  input  logic [WIDTH-1:0] b2,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] sum
);

  logic [WIDTH-1:0] s1, k1, s2, k2, s3, k3;

  csa #(.WIDTH(WIDTH)) u_row1 (.a(c),  .b(a1), .c(b1), .sum(s1), .carry(k1));
  csa #(.WIDTH(WIDTH)) u_row2 (.a(s1), .b(k1), .c(a2), .sum(s2), .carry(k2));
  csa #(.WIDTH(WIDTH)) u_row3 (.a(s2), .b(k2), .c(b2), .sum(s3), .carry(k3));

  // Final carry-propagate row.
  assign sum = s3 + k3;

endmodule
