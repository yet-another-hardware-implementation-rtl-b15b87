// Self-checking test of pp_generator: for random multiplicands and every
// Booth digit -2..+2, the row must be (|digit|*Y) xor sign, with ~sign on top,
// so that row + sign equals digit*Y in two's complement.
module tb_pp_generator;
  import modmul_pkg::*;

  localparam int unsigned M_W = 20;

  int checks = 0, failures = 0;
  logic [M_W-1:0] y;
  booth_sel_t     sel;
  logic [M_W+1:0] pp;

  pp_generator #(.M_W(M_W)) dut (.y(y), .sel(sel), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      y = (t == 0) ? '1 : M_W'($urandom);
      for (int d = -2; d <= 2; d++) begin
        longint mag, expect_body, signed_val, expect_signed;
        sel.sy  = (d == 1 || d == -1);
        sel.s2y = (d == 2 || d == -2);
        sel.s   = (d < 0);
        #1;
        mag         = (d < 0 ? -d : d) * longint'(y);
        expect_body = sel.s ? (~mag & ((64'd1 << (M_W + 1)) - 1)) : mag;
        // Row read as a two's complement number whose sign is the inverse of the top bit, plus s.
        signed_val    = longint'(pp[M_W:0]) - (pp[M_W+1] ? 64'sd0 : (64'sd1 <<< (M_W + 1)))
                        + longint'(sel.s);
        expect_signed = longint'(d) * longint'(y);
        checks++;
        if (pp[M_W:0] !== expect_body[M_W:0] || pp[M_W+1] !== ~sel.s) begin
          failures++;
          $display("FAIL y=%h d=%0d pp=%h", y, d, pp);
        end
        checks++;
        if (signed_val != expect_signed) begin
          failures++;
          $display("FAIL value y=%h d=%0d got %0d want %0d", y, d, signed_val, expect_signed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
