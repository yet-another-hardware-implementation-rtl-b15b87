// Self-checking test of csa: sum must be the bitwise xor of the operands and
// sum + carry must equal a + b + c modulo 2^WIDTH.
module tb_csa;
  localparam int unsigned WIDTH = 45;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] a, b, c, sum, carry;

  csa #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [WIDTH-1:0] total;
      if (t == 0) begin a = '1; b = '1; c = '1; end
      else begin
        a = {$urandom, $urandom};
        b = {$urandom, $urandom};
        c = {$urandom, $urandom};
      end
      #1;
      total = a + b + c;
      checks++;
      if (sum !== (a ^ b ^ c) || WIDTH'(sum + carry) !== total) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h c=%h sum=%h carry=%h", a, b, c, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
