// Self-checking test of pp_adder: three tree sizes (3 operands: one cell;
// 50 operands: three levels; 1 operand: wire) must give the modular sum.
module tb_pp_adder;
  localparam int unsigned WIDTH = 48;

  int checks = 0, failures = 0;
  logic [49:0][WIDTH-1:0] pp50;
  logic [2:0][WIDTH-1:0]  pp3;
  logic [0:0][WIDTH-1:0]  pp1;
  logic [WIDTH-1:0]       s50, s3, s1;

  pp_adder #(.COUNT(50), .WIDTH(WIDTH)) dut50 (.pp(pp50), .sum(s50));
  pp_adder #(.COUNT(3),  .WIDTH(WIDTH)) dut3  (.pp(pp3),  .sum(s3));
  pp_adder #(.COUNT(1),  .WIDTH(WIDTH)) dut1  (.pp(pp1),  .sum(s1));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [WIDTH-1:0] w50, w3;
      for (int i = 0; i < 50; i++) pp50[i] = (t == 0) ? '1 : {$urandom, $urandom};
      for (int i = 0; i < 3; i++)  pp3[i]  = {$urandom, $urandom};
      pp1[0] = {$urandom, $urandom};
      #1;
      w50 = '0;
      for (int i = 0; i < 50; i++) w50 += pp50[i];
      w3 = pp3[0] + pp3[1] + pp3[2];
      checks += 3;
      if (s50 !== w50) begin failures++; if (failures < 10) $display("FAIL 50: %h %h", s50, w50); end
      if (s3 !== w3)   begin failures++; if (failures < 10) $display("FAIL 3: %h %h", s3, w3); end
      if (s1 !== pp1[0]) begin failures++; if (failures < 10) $display("FAIL 1"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
