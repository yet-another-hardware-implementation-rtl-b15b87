// Self-checking test of booth_recoder: all eight bit triples against the
// radix-4 digit value (lsb + mid - 2*msb) they stand for.
module tb_booth_recoder;
  import modmul_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0]  bits;
  booth_sel_t  sel;

  booth_recoder dut (.bits(bits), .sel(sel));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int d, mag;
      bits = 3'(v);
      #1;
      d   = int'(bits[0]) + int'(bits[1]) - 2 * int'(bits[2]);
      mag = (d < 0) ? -d : d;
      checks++;
      if (sel.sy !== (mag == 1) || sel.s2y !== (mag == 2) || sel.s !== bits[2]) begin
        failures++;
        $display("FAIL bits=%b digit=%0d sy=%b s2y=%b s=%b", bits, d, sel.sy, sel.s2y, sel.s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
