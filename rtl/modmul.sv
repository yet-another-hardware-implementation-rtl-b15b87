// Modular multiplier: result = X * Y mod M for N-bit operands, by radix-4
// Booth multiplication and Barrett reduction on one shared multiplier.
//
// Barrett's method replaces the division by M with two more products. With
// mu = floor(2^(2N) / M) supplied pre-computed, one operation runs:
//   step 1  P = X * Y
//   step 2  Q = floor( floor(P / 2^(N-1)) * mu / 2^(N+1) )
//   step 3  R = P - Q * M, then minus M once or twice until R < M
// MUX 1 feeds register1 with X, P/2^(N-1) or Q; MUX 2 feeds register2 with Y,
// mu or M; both are steered by {Mux_H, Mux_L}. The multiplier (PPG + ADDER)
// between register1/register2 and its output is combinational. register3
// keeps P from step 1 for the REDUCER, whose result is loaded into acc. The
// shifts by N-1 and N+1 are wiring.
//
// The multiplier is N+2 bits wide, enough for P / 2^(N-1) (N+1 bits) and mu
// (up to N+2 bits); register3 keeps only the low N+2 bits of P, all the
// reducer needs since P - Q*M < 3M. Inputs must satisfy 2^(N-1) <= M < 2^N
// and X, Y < M; mu must equal floor(2^(2N) / M).
//
// Interface: pulse start (for one or more cycles) with x, y, m, mu valid;
// they are sampled at the edge that starts the operation. busy stays high
// until done pulses, one cycle, with result valid; result then holds until
// the next operation ends. Latency: counting the cycle in which start is taken
// as cycle 0, done is high in cycle 3*SETTLE_CYCLES + REDUCE_CYCLES + 1 (5 at
// the defaults). How long the
// combinational paths are given (SETTLE_CYCLES, REDUCE_CYCLES), the internal
// widths and the handshake are this design's choices; the datapath, the three
// steps and the names of the control strobes follow the architecture.
module modmul
  import modmul_pkg::*;
#(
  parameter int unsigned N             = 1024,  // operand and modulus width
  parameter int unsigned SETTLE_CYCLES = 1,     // cycles for PPG + ADDER to settle
  parameter int unsigned REDUCE_CYCLES = 1      // extra cycles for the REDUCER
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [N-1:0]     x,
  input  logic [N-1:0]     y,
  input  logic [N-1:0]     m,
  input  logic [N+1:0]     mu,
  output logic             busy,
  output logic             done,
  output logic [N-1:0]     result
);

  localparam int unsigned W = N + 2;  // multiplier operand width

  logic mux_h, mux_l, load_reg, load_reg_4, load_acc, load_const;

  logic [W-1:0]   register1, register2, register3;
  logic [W-1:0]   mu_reg;      // the extra register holding floor(2^(2N)/M)
  logic [N-1:0]   m_reg;
  logic [N-1:0]   acc;
  logic [2*W-1:0] product;     // ADDER output
  logic [W-1:0]   mux1, mux2;
  logic [W-1:0]   reduced;
  logic [1:0]     corrections;

  modmul_ctrl #(
    .SETTLE_CYCLES (SETTLE_CYCLES),
    .REDUCE_CYCLES (REDUCE_CYCLES)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .mux_h      (mux_h),
    .mux_l      (mux_l),
    .load_reg   (load_reg),
    .load_reg_4 (load_reg_4),
    .load_acc   (load_acc),
    .load_const (load_const),
    .busy       (busy),
    .done       (done)
  );

  // MUX 1 and MUX 2.
  always_comb begin
    unique case (mux_sel_e'({mux_h, mux_l}))
      SEL_PRODUCT: begin
        mux1 = {2'b00, x};
        mux2 = {2'b00, y};
      end
      SEL_QUOTIENT: begin
        mux1 = product[N-1 +: W];          // P / 2^(N-1)
        mux2 = mu_reg;
      end
      SEL_REDUCE: begin
        mux1 = product[N+1 +: W];          // Q = (P/2^(N-1) * mu) / 2^(N+1)
        mux2 = {2'b00, m_reg};
      end
      default: begin
        mux1 = '0;
        mux2 = '0;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      register1 <= '0;
      register2 <= '0;
      register3 <= '0;
      mu_reg    <= '0;
      m_reg     <= '0;
      acc       <= '0;
    end else begin
      if (load_const) begin
        mu_reg <= mu;
        m_reg  <= m;
      end
      if (load_reg) begin
        register1 <= mux1;
        register2 <= mux2;
      end
      if (load_reg_4) register3 <= product[W-1:0];
      if (load_acc)   acc       <= reduced[N-1:0];
    end
  end

  // PPG + ADDER
  booth_multiplier #(.W(W)) u_mult (
    .x (register1),
    .y (register2),
    .p (product)
  );

  // REDUCER: P - Q*M, corrected into [0, M).
  reducer #(.WIDTH(W)) u_red (
    .p    (register3),
    .qm   (product[W-1:0]),
    .m    ({2'b00, m_reg}),
    .r    (reduced),
    .corr (corrections)
  );

  assign result = acc;

endmodule
