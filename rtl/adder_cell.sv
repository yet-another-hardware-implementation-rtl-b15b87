// Main cell of the partial product adder: seven operands in, one sum out.
//
// CSA_1 compresses PP_0..PP_2 into (carry_1, sum_1), CSA_2 compresses
// PP_4..PP_6 into (carry_2, sum_2), and the delayed carry adder adds both
// pairs and PP_3 into SUM = PP_0 + ... + PP_6 modulo 2^WIDTH. Combinational.
module adder_cell #(
  parameter int unsigned WIDTH = 2052
) (
  input  logic [6:0][WIDTH-1:0] pp,
  output logic [WIDTH-1:0]      sum
);

  logic [WIDTH-1:0] carry_1, sum_1, carry_2, sum_2;

  csa #(.WIDTH(WIDTH)) u_csa1 (.a(pp[0]), .b(pp[1]), .c(pp[2]), .sum(sum_1), .carry(carry_1));
  csa #(.WIDTH(WIDTH)) u_csa2 (.a(pp[4]), .b(pp[5]), .c(pp[6]), .sum(sum_2), .carry(carry_2));

  dca #(.WIDTH(WIDTH)) u_cda (
    .a1  (carry_1),
    .b1  (sum_1),
    .a2  (carry_2),
    .b2  (sum_2),
    .c   (pp[3]),
    .sum (sum)
  );

endmodule
