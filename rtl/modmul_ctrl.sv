// Sequencer of the modular multiplier.
//
// One operation is three passes through the shared multiplier. Accepting
// start (while idle) loads register1/register2 with X and Y ({Mux_H, Mux_L} =
// 00) and captures M and mu. After SETTLE_CYCLES cycles for the
// combinational partial product generator and adder, it loads register1,
// register2 and register3 (Load_Reg, Load_Reg_4) with P/2^(n-1), mu and P
// (code 01); after SETTLE_CYCLES more, register1/register2 with Q and M (code
// 10); after SETTLE_CYCLES + REDUCE_CYCLES, during which the product Q*M and
// then the reducer settle, it loads the accumulator (Load_Acc). done is high
// for one cycle right after that load. Counting the cycle in which start is
// taken as cycle 0, the strobes come in cycles SETTLE_CYCLES, 2*SETTLE_CYCLES
// and 3*SETTLE_CYCLES + REDUCE_CYCLES, and done is high in cycle
// 3*SETTLE_CYCLES + REDUCE_CYCLES + 1. A start seen while busy is ignored. The three steps and the strobe
// names follow the architecture; the state machine, the wait counts and the
// start/busy/done handshake are this design's own.
module modmul_ctrl
  import modmul_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 1,  // >= 1: cycles given to PPG + ADDER
  parameter int unsigned REDUCE_CYCLES = 1   // >= 0: extra cycles for the REDUCER
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic mux_h,
  output logic mux_l,
  output logic load_reg,     // register1 and register2
  output logic load_reg_4,   // register3
  output logic load_acc,     // accumulator
  output logic load_const,   // M and mu holding registers
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {
    IDLE,
    STEP1,   // product X*Y settling
    STEP2,   // quotient estimate settling
    STEP3    // Q*M and the reducer settling
  } state_e;

  localparam int unsigned MAXWAIT = SETTLE_CYCLES + REDUCE_CYCLES;
  localparam int unsigned CW      = $clog2(MAXWAIT + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  mux_sel_e      sel;
  logic          last;   // final cycle of the current wait

  assign last = (cnt == '0);

  always_comb begin
    sel        = SEL_PRODUCT;
    load_reg   = 1'b0;
    load_reg_4 = 1'b0;
    load_acc   = 1'b0;
    load_const = 1'b0;
    unique case (state)
      IDLE: begin
        sel        = SEL_PRODUCT;
        load_reg   = start;
        load_const = start;
      end
      STEP1: begin
        sel        = SEL_QUOTIENT;
        load_reg   = last;
        load_reg_4 = last;
      end
      STEP2: begin
        sel        = SEL_REDUCE;
        load_reg   = last;
      end
      STEP3: begin
        sel        = SEL_REDUCE;
        load_acc   = last;
      end
      default: ;
    endcase
    {mux_h, mux_l} = sel;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= load_acc;
      unique case (state)
        IDLE:
          if (start) begin
            state <= STEP1;
            cnt   <= CW'(SETTLE_CYCLES - 1);
          end
        STEP1:
          if (last) begin
            state <= STEP2;
            cnt   <= CW'(SETTLE_CYCLES - 1);
          end else cnt <= cnt - 1'b1;
        STEP2:
          if (last) begin
            state <= STEP3;
            cnt   <= CW'(MAXWAIT - 1);
          end else cnt <= cnt - 1'b1;
        STEP3:
          if (last) state <= IDLE;
          else      cnt <= cnt - 1'b1;
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // Only one strobe family may fire per cycle, and a load only while a step runs.
  a_one_step: assert property (@(posedge clk) disable iff (!rst_n)
                               !(load_acc && load_reg));
  a_settle: assert property (@(posedge clk) disable iff (!rst_n)
                             load_acc |-> state == STEP3);

endmodule
