// Self-checking test of adder_cell: SUM must equal PP_0 + ... + PP_6 modulo
// 2^WIDTH; each operand is also driven alone to catch a dropped input.
module tb_adder_cell;
  localparam int unsigned WIDTH = 40;

  int checks = 0, failures = 0;
  logic [6:0][WIDTH-1:0] pp;
  logic [WIDTH-1:0]      sum;

  adder_cell #(.WIDTH(WIDTH)) dut (.pp(pp), .sum(sum));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [WIDTH-1:0] want = '0;
    #1;
    for (int i = 0; i < 7; i++) want += pp[i];
    checks++;
    if (sum !== want) begin
      failures++;
      if (failures < 10) $display("FAIL sum=%h want=%h", sum, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 7; i++) begin
      pp = '0;
      pp[i] = WIDTH'(64'h5a5a_1234_0f0f) + WIDTH'(i);
      check();
    end
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 7; i++) pp[i] = (t == 0) ? '1 : {$urandom, $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
