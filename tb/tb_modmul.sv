// End-to-end test of modmul at two sizes, N = 16 (4000 random operations)
// and N = 256 (300), each with corner operands, checked against x*y % m and
// for latency. It counts how often each mechanism of the design was
// exercised, over both sizes, and fails if one never was: the reducer
// finishing with no, one and two subtractions of M, a start ignored while
// busy, and back-to-back operations with a new modulus.
module tb_modmul;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fin_a, fin_b;
  int   chk_a, chk_b, fail_a, fail_b;
  int   c0_a, c1_a, c2_a, ig_a, nm_a;
  int   c0_b, c1_b, c2_b, ig_b, nm_b;

  modmul_runner #(.N(16), .OPS(4000)) run_a (
    .clk(clk), .rst_n(rst_n), .finished(fin_a), .checks(chk_a), .failures(fail_a),
    .n_corr0(c0_a), .n_corr1(c1_a), .n_corr2(c2_a), .n_ignored(ig_a), .n_new_modulus(nm_a));

  modmul_runner #(.N(256), .OPS(300)) run_b (
    .clk(clk), .rst_n(rst_n), .finished(fin_b), .checks(chk_b), .failures(fail_b),
    .n_corr0(c0_b), .n_corr1(c1_b), .n_corr2(c2_b), .n_ignored(ig_b), .n_new_modulus(nm_b));

  always #5 clk = ~clk;

  task automatic report(int extra_checks, int extra_failures);
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b + extra_checks,
             fail_a + fail_b + extra_failures);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    report(1, 1);
    $finish;
  end

  initial begin
    int mech_fail = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (fin_a && fin_b);
    $display("mechanisms: corrections 0/1/2 = %0d/%0d/%0d, start while busy = %0d, modulus changes = %0d",
             c0_a + c0_b, c1_a + c1_b, c2_a + c2_b, ig_a + ig_b, nm_a + nm_b);
    if (c0_a + c0_b == 0) mech_fail++;
    if (c1_a + c1_b == 0) mech_fail++;
    if (c2_a + c2_b == 0) mech_fail++;
    if (ig_a + ig_b == 0) mech_fail++;
    if (nm_a + nm_b == 0) mech_fail++;
    report(5, mech_fail);
    $finish;
  end
endmodule
