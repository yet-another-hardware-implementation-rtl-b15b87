// Test driver for one modmul instance of width N: runs OPS random modular
// multiplications (plus corner operands X, Y = 0, 1, M-1 and the smallest and
// largest moduli) against x*y % m, checks each latency, and counts how often
// the reducer needed 0, 1 and 2 subtractions of M, how often a start was
// ignored while busy, and how often the modulus changed between operations.
// finished rises when all operations are done; the counters are then final.
module modmul_runner #(
  parameter int unsigned N   = 16,
  parameter int unsigned OPS = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_corr0,
  output int   n_corr1,
  output int   n_corr2,
  output int   n_ignored,
  output int   n_new_modulus
);
  localparam int unsigned S = 1;   // the defaults of modmul
  localparam int unsigned R = 1;

  logic           start;
  logic [N-1:0]   x, y, m;
  logic [N+1:0]   mu;
  logic           busy, done;
  logic [N-1:0]   result;

  modmul #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x(x), .y(y), .m(m), .mu(mu),
    .busy(busy), .done(done), .result(result));

  // How many corrections the reducer applied, seen when the accumulator loads.
  always @(posedge clk)
    if (rst_n && dut.load_acc)
      unique case (dut.corrections)
        2'b00:   n_corr0++;
        2'b01:   n_corr1++;
        default: n_corr2++;
      endcase

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] v = '0;
    for (int i = 0; i < (int'(N) + 31) / 32; i++) v = (v << 32) | N'($urandom);
    return v;
  endfunction

  task automatic run_op(logic [N-1:0] xv, logic [N-1:0] yv, logic [N-1:0] mv, bit hold_start);
    logic [3*N-1:0] want;
    logic [2*N+1:0] mu_full;
    int cyc;
    @(negedge clk);
    x = xv; y = yv; m = mv;
    mu_full = ((2*N+2)'(1) << (2*N)) / (2*N+2)'(mv);
    mu = mu_full[N+1:0];
    start = 1'b1;
    want = ({{(2*N){1'b0}}, xv} * {{(2*N){1'b0}}, yv}) % {{(2*N){1'b0}}, mv};
    @(negedge clk);
    if (!hold_start) start = 1'b0;
    else begin
      // Scramble the inputs while busy: a new start must not disturb the operation.
      x = ~xv; y = ~yv; m = ~mv; mu = ~mu;
      n_ignored++;
    end
    for (cyc = 1; cyc < 100 && !done; cyc++) @(negedge clk);
    start = 1'b0;
    checks++;
    if (cyc != int'(3 * S + R + 1)) begin
      failures++;
      $display("FAIL N=%0d latency %0d", N, cyc);
    end
    checks++;
    if (result !== want[N-1:0]) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d %h*%h mod %h = %h, want %h", N, xv, yv, mv, result, want[N-1:0]);
    end
  endtask

  initial begin
    logic [N-1:0] mv, prev_m;
    finished = 1'b0; start = 1'b0;
    checks = 0; failures = 0; n_ignored = 0; n_new_modulus = 0;
    n_corr0 = 0; n_corr1 = 0; n_corr2 = 0;
    x = '0; y = '0; m = '0; mu = '0;
    wait (rst_n);
    run_op('0, '0, {1'b1, {(N-1){1'b0}}}, 1'b0);
    run_op({(N-1){1'b1}}, {(N-1){1'b1}}, {1'b1, {(N-1){1'b0}}}, 1'b0);
    run_op('1 - 1'b1, '1 - 1'b1, '1, 1'b0);
    run_op(N'(1), '1 - 1'b1, '1, 1'b0);
    prev_m = '1;
    for (int t = 0; t < int'(OPS); t++) begin
      mv = rnd() | {1'b1, {(N-1){1'b0}}};
      if (mv != prev_m) n_new_modulus++;
      prev_m = mv;
      run_op(rnd() % mv, rnd() % mv, mv, (t % 50) == 7);
      if (t % 100 == 0) run_op(mv - 1'b1, mv - 1'b1, mv, 1'b0);
    end
    finished = 1'b1;
  end
endmodule
