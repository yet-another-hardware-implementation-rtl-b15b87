// Shared types of the Booth/Barrett modular multiplier.
//
// booth_sel_t is the three-wire output of one Booth recoder: sy selects the
// multiplicand itself, s2y selects it doubled, and s (the digit's top bit)
// asks the partial product generator to complement the row. mux_sel_e is the
// two-bit {Mux_H, Mux_L} code shared by the two operand multiplexers of the
// modular multiplier; each code names the step of the algorithm it serves.
package modmul_pkg;

  typedef struct packed {
    logic sy;   // digit is +1 or -1
    logic s2y;  // digit is +2 or -2
    logic s;    // digit is negative (or the all-ones code, which is zero)
  } booth_sel_t;

  // {Mux_H, Mux_L}. MUX 2 codes are printed in the architecture drawing;
  // MUX 1 follows the same order.
  typedef enum logic [1:0] {
    SEL_PRODUCT  = 2'b00,  // step 1: X,             Y
    SEL_QUOTIENT = 2'b01,  // step 2: P / 2^(n-1),   mu = 2^(2n)/M
    SEL_REDUCE   = 2'b10   // step 3: Q,             M
  } mux_sel_e;

endpackage
