// Self-checking test of booth_multiplier: exhaustive at W = 8, random and
// corner operands at W = 130 and W = 258, against the simulator's own
// multiplication. (The 1026-bit width of the modular multiplier is exercised
// by the full-size modmul test.)
module tb_booth_multiplier;
  localparam int unsigned WS = 8;
  localparam int unsigned WM = 130;
  localparam int unsigned WL = 258;

  int checks = 0, failures = 0;

  logic [WS-1:0] xs, ys;  logic [2*WS-1:0] ps;
  logic [WM-1:0] xm, ym;  logic [2*WM-1:0] pm;
  logic [WL-1:0] xl, yl;  logic [2*WL-1:0] pl;

  booth_multiplier #(.W(WS)) dut_s (.x(xs), .y(ys), .p(ps));
  booth_multiplier #(.W(WM)) dut_m (.x(xm), .y(ym), .p(pm));
  booth_multiplier #(.W(WL)) dut_l (.x(xl), .y(yl), .p(pl));

  function automatic logic [WL-1:0] rnd(int bits);
    logic [WL-1:0] v = '0;
    for (int i = 0; i < (WL + 31) / 32; i++) v = (v << 32) | WL'($urandom);
    return (bits >= int'(WL)) ? v : v & ((WL'(1) << bits) - 1);
  endfunction

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xl = '0; yl = '0; xm = '0; ym = '0;
    for (int a = 0; a < (1 << WS); a++)
      for (int b = 0; b < (1 << WS); b++) begin
        xs = WS'(a); ys = WS'(b);
        #1;
        checks++;
        if (ps !== (2*WS)'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL W=%0d %0d*%0d=%0d", WS, a, b, ps);
        end
      end
    for (int t = 0; t < 500; t++) begin
      xm = (t == 0) ? '1 : rnd(WM)[WM-1:0];
      ym = (t == 0) ? '1 : rnd(WM)[WM-1:0];
      #1;
      checks++;
      if (pm !== {{WM{1'b0}}, xm} * {{WM{1'b0}}, ym}) begin
        failures++;
        if (failures < 10) $display("FAIL W=%0d x=%h y=%h", WM, xm, ym);
      end
    end
    for (int t = 0; t < 200; t++) begin
      xl = (t == 0) ? '1 : rnd(t == 1 ? int'(WL) - 1 : WL);
      yl = (t == 0) ? '1 : rnd(WL);
      #1;
      checks++;
      if (pl !== {{WL{1'b0}}, xl} * {{WL{1'b0}}, yl}) begin
        failures++;
        if (failures < 10) $display("FAIL W=%0d t=%0d", WL, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
