// Self-checking test of modmul_ctrl with SETTLE_CYCLES = 2, REDUCE_CYCLES = 3:
// after start, the strobes must come in order (Load_Reg with code 00 and the
// constants, Load_Reg + Load_Reg_4 with code 01, Load_Reg with code 10,
// Load_Acc) at the expected cycle offsets, done must follow Load_Acc by one
// cycle, and a start while busy must be ignored.
module tb_modmul_ctrl;
  localparam int unsigned S = 2;
  localparam int unsigned R = 3;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic mux_h, mux_l, load_reg, load_reg_4, load_acc, load_const, busy, done;

  modmul_ctrl #(.SETTLE_CYCLES(S), .REDUCE_CYCLES(R)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .mux_h(mux_h), .mux_l(mux_l),
    .load_reg(load_reg), .load_reg_4(load_reg_4), .load_acc(load_acc),
    .load_const(load_const), .busy(busy), .done(done));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_now(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got=%b want=%b at %0t", what, got, want, $time);
    end
  endtask

  // One operation; start held for `hold` cycles to test that a start while busy is ignored.
  task automatic run_op(int hold);
    int cyc;
    int t_load2 = 0, t_load3 = 0, t_acc = 0, t_done = 0;
    @(negedge clk);
    start = 1'b1;
    #1;
    expect_now("load_reg@start", load_reg, 1'b1);
    expect_now("load_const@start", load_const, 1'b1);
    expect_now("code 00", mux_h | mux_l, 1'b0);
    cyc = 0;
    @(negedge clk);
    for (cyc = 1; cyc < 40; cyc++) begin
      if (cyc >= hold) start = 1'b0;
      expect_now("busy", busy, 1'b1);
      expect_now("no const reload", load_const, 1'b0);
      if (load_reg && load_reg_4) begin
        t_load2 = cyc;
        expect_now("code 01", {mux_h, mux_l} == 2'b01, 1'b1);
      end else if (load_reg) begin
        t_load3 = cyc;
        expect_now("code 10", {mux_h, mux_l} == 2'b10, 1'b1);
      end
      if (load_acc) t_acc = cyc;
      @(negedge clk);
      if (done) begin
        t_done = cyc + 1;
        break;
      end
    end
    checks++;
    if (t_load2 != S || t_load3 != 2 * S || t_acc != 3 * S + R || t_done != 3 * S + R + 1) begin
      failures++;
      $display("FAIL timing load2=%0d load3=%0d acc=%0d done=%0d", t_load2, t_load3, t_acc, t_done);
    end
    expect_now("idle after done", busy, 1'b0);
    @(negedge clk);
    expect_now("done is a pulse", done, 1'b0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_now("idle after reset", busy, 1'b0);
    run_op(1);
    run_op(5);   // start still high during the operation
    run_op(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
