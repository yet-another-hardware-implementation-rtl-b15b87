// Self-checking test of ppg: the aligned rows must add up, modulo 2^(2W), to
// x*y. W = 8 is tried exhaustively, W = 66 on random and corner operands.
module tb_ppg;
  localparam int unsigned WS = 8;
  localparam int unsigned KS = WS / 2 + 1;
  localparam int unsigned WL = 66;
  localparam int unsigned KL = WL / 2 + 1;

  int checks = 0, failures = 0;

  logic [WS-1:0]           xs, ys;
  logic [KS-1:0][2*WS-1:0] pps;
  logic [WL-1:0]           xl, yl;
  logic [KL-1:0][2*WL-1:0] ppl;

  ppg #(.W(WS)) dut_s (.x(xs), .y(ys), .pp(pps));
  ppg #(.W(WL)) dut_l (.x(xl), .y(yl), .pp(ppl));

  function automatic logic [WL-1:0] rnd_l();
    return {$urandom, $urandom, $urandom};
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << WS); a++) begin
      for (int b = 0; b < (1 << WS); b++) begin
        logic [2*WS-1:0] sum;
        xs = WS'(a);
        ys = WS'(b);
        #1;
        sum = '0;
        for (int i = 0; i < KS; i++) sum += pps[i];
        checks++;
        if (sum !== (2*WS)'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL W=%0d x=%0d y=%0d sum=%0d", WS, a, b, sum);
        end
      end
    end
    for (int t = 0; t < 2000; t++) begin
      logic [2*WL-1:0] sum, want;
      unique case (t)
        0: begin xl = '1; yl = '1; end
        1: begin xl = '0; yl = '1; end
        2: begin xl = {WL/2{2'b10}}; yl = '1; end   // every digit -2 or -1
        default: begin xl = rnd_l(); yl = rnd_l(); end
      endcase
      #1;
      sum = '0;
      for (int i = 0; i < KL; i++) sum += ppl[i];
      want = {{WL{1'b0}}, xl} * {{WL{1'b0}}, yl};
      checks++;
      if (sum !== want) begin
        failures++;
        if (failures < 10) $display("FAIL W=%0d x=%h y=%h sum=%h want=%h", WL, xl, yl, sum, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
