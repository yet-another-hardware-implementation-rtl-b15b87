// Self-checking test of dca: sum must equal a1 + b1 + a2 + b2 + c modulo
// 2^WIDTH, including all-ones operands that overflow.
module tb_dca;
  localparam int unsigned WIDTH = 50;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] a1, b1, a2, b2, c, sum;

  dca #(.WIDTH(WIDTH)) dut (.a1(a1), .b1(b1), .a2(a2), .b2(b2), .c(c), .sum(sum));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [WIDTH-1:0] want;
      if (t == 0) begin a1 = '1; b1 = '1; a2 = '1; b2 = '1; c = '1; end
      else begin
        a1 = {$urandom, $urandom};
        b1 = {$urandom, $urandom};
        a2 = {$urandom, $urandom};
        b2 = {$urandom, $urandom};
        c  = {$urandom, $urandom};
      end
      #1;
      want = a1 + b1 + a2 + b2 + c;
      checks++;
      if (sum !== want) begin
        failures++;
        if (failures < 10) $display("FAIL sum=%h want=%h", sum, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
