// Self-checking test of cla: exhaustive at WIDTH = 6 with both carry-ins,
// random and long-carry-chain operands at WIDTH = 1026.
module tb_cla;
  localparam int unsigned WS = 6;
  localparam int unsigned WL = 1026;

  int checks = 0, failures = 0;
  logic [WS-1:0] as, bs, ss;  logic cs, cos;
  logic [WL-1:0] al, bl, sl;  logic cl, col;

  cla #(.WIDTH(WS)) dut_s (.a(as), .b(bs), .cin(cs), .s(ss), .cout(cos));
  cla #(.WIDTH(WL)) dut_l (.a(al), .b(bl), .cin(cl), .s(sl), .cout(col));

  function automatic logic [WL-1:0] rnd();
    logic [WL-1:0] v = '0;
    for (int i = 0; i < (WL + 31) / 32; i++) v = (v << 32) | WL'($urandom);
    return v;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    al = '0; bl = '0; cl = 1'b0;
    for (int a = 0; a < (1 << WS); a++)
      for (int b = 0; b < (1 << WS); b++)
        for (int c = 0; c < 2; c++) begin
          as = WS'(a); bs = WS'(b); cs = c[0];
          #1;
          checks++;
          if ({cos, ss} !== (WS+1)'(a + b + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d -> %b %0d", a, b, c, cos, ss);
          end
        end
    for (int t = 0; t < 2000; t++) begin
      unique case (t)
        0: begin al = '1; bl = '0; cl = 1'b1; end            // carry through every bit
        1: begin al = '1; bl = '1; cl = 1'b1; end
        2: begin al = {1'b0, {(WL-1){1'b1}}}; bl = WL'(1); cl = 1'b0; end
        default: begin al = rnd(); bl = rnd(); cl = t[0]; end
      endcase
      #1;
      checks++;
      if ({col, sl} !== {1'b0, al} + {1'b0, bl} + (WL+1)'(cl)) begin
        failures++;
        if (failures < 10) $display("FAIL wide t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
