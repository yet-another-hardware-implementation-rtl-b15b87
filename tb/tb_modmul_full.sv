// Full-size test of modmul at its default parameters (1024-bit operands):
// a few complete modular multiplications with random 1024-bit moduli
// (top bit set) and operands below them, plus the corner X = Y = M-1, each
// checked against x*y % m and for its latency (5 cycles at the defaults).
module tb_modmul_full;
  localparam int unsigned N = 1024;
  localparam int unsigned LATENCY = 5;

  int checks = 0, failures = 0;

  logic           clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0]   x, y, m;
  logic [N+1:0]   mu;
  logic           busy, done;
  logic [N-1:0]   result;

  modmul dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x(x), .y(y), .m(m), .mu(mu),
    .busy(busy), .done(done), .result(result));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] v = '0;
    for (int i = 0; i < N / 32; i++) v = (v << 32) | N'($urandom);
    return v;
  endfunction

  task automatic run_op(logic [N-1:0] xv, logic [N-1:0] yv, logic [N-1:0] mv);
    logic [3*N-1:0] want;
    logic [2*N+1:0] mu_full;
    int cyc;
    @(negedge clk);
    x = xv; y = yv; m = mv;
    mu_full = ((2*N+2)'(1) << (2*N)) / (2*N+2)'(mv);
    mu = mu_full[N+1:0];
    want = ({{(2*N){1'b0}}, xv} * {{(2*N){1'b0}}, yv}) % {{(2*N){1'b0}}, mv};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (cyc = 1; cyc < 100 && !done; cyc++) @(negedge clk);
    checks++;
    if (cyc != LATENCY) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
    checks++;
    if (result !== want[N-1:0]) begin
      failures++;
      $display("FAIL result mismatch for modulus %h", mv);
    end
  endtask

  initial begin
    logic [N-1:0] mv;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4; t++) begin
      mv = rnd() | {1'b1, {(N-1){1'b0}}};
      run_op(rnd() % mv, rnd() % mv, mv);
    end
    run_op(mv - 1'b1, mv - 1'b1, mv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
