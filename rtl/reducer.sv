// Reducer: r = (p - qm) reduced into [0, m).
//
// The subtraction P - Q*M is done as an addition of the two's complement,
// p + ~qm + 1, in a carry look-ahead adder (its carry-in supplies the +1).
// Barrett's estimate of the quotient may be short by up to two, so the
// difference lies in [0, 3m); two further look-ahead adders each compute
// d - m, and their carry out (no borrow) says whether d >= m, in which case
// the difference replaces d; corr tells which corrections were applied. Only the low WIDTH bits of p and qm are needed
// because the true difference is below 3m < 2^WIDTH. Combinational.
module reducer #(
  parameter int unsigned WIDTH = 1026
) (
  input  logic [WIDTH-1:0] p,   // P, from register3
  input  logic [WIDTH-1:0] qm,  // Q*M, from the partial product adder
  input  logic [WIDTH-1:0] m,   // modulus
  output logic [WIDTH-1:0] r,
  output logic [1:0]       corr  // {second, first} correction subtracted m
);

  logic [WIDTH-1:0] d0, t1, d1, t2;
  logic             c0, ge1, ge2;  // c0 is only a borrow flag of P - Q*M >= 0, always 1 for valid inputs

  // P + (2^WIDTH - Q*M)
  cla #(.WIDTH(WIDTH)) u_sub (.a(p), .b(~qm), .cin(1'b1), .s(d0), .cout(c0));

  // First correction: subtract M if d0 >= M.
  cla #(.WIDTH(WIDTH)) u_fix1 (.a(d0), .b(~m), .cin(1'b1), .s(t1), .cout(ge1));
  assign d1 = ge1 ? t1 : d0;

  // Second correction.
  cla #(.WIDTH(WIDTH)) u_fix2 (.a(d1), .b(~m), .cin(1'b1), .s(t2), .cout(ge2));
  assign r = ge2 ? t2 : d1;

  assign corr = {ge2, ge1};

endmodule
