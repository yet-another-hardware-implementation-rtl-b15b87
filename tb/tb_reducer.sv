// Self-checking test of reducer at N = 64 (WIDTH = 66): P = X*Y with X, Y < M,
// and a quotient estimate short by 0, 1 or 2, as Barrett's method may give.
// The result must be P mod M and the correction flags must show how many
// subtractions of M were needed.
module tb_reducer;
  localparam int unsigned N = 64;
  localparam int unsigned WIDTH = N + 2;

  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};
  logic [WIDTH-1:0] p, qm, m, r;
  logic [1:0]       corr;

  reducer #(.WIDTH(WIDTH)) dut (.p(p), .qm(qm), .m(m), .r(r), .corr(corr));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0]   mm, xx, yy;
      logic [2*N-1:0] pp, q, prod_qm;
      int             e;
      mm = {1'b1, 31'($urandom), $urandom};
      xx = {$urandom, $urandom} % mm;
      yy = {$urandom, $urandom} % mm;
      pp = {{N{1'b0}}, xx} * {{N{1'b0}}, yy};
      q  = pp / {{N{1'b0}}, mm};
      e  = t % 3;
      if (q < (2*N)'(e)) e = 0;
      q  = q - (2*N)'(e);
      prod_qm = q * {{N{1'b0}}, mm};
      p  = pp[WIDTH-1:0];
      qm = prod_qm[WIDTH-1:0];
      m  = {2'b00, mm};
      #1;
      checks++;
      if (r !== WIDTH'(pp % {{N{1'b0}}, mm})) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d e=%0d r=%h", t, e, r);
      end
      checks++;
      if (corr !== ((e == 0) ? 2'b00 : (e == 1) ? 2'b01 : 2'b11)) begin
        failures++;
        if (failures < 10) $display("FAIL corr t=%0d e=%0d corr=%b", t, e, corr);
      end
      seen[e]++;
    end
    for (int e = 0; e < 3; e++) begin
      checks++;
      if (seen[e] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
