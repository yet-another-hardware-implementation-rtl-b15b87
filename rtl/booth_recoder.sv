// Booth recoder (radix-4 selection logic, one per partial product).
//
// Takes three adjacent multiplier bits {x(2i+1), x(2i), x(2i-1)} (msb first)
// and says which multiple of the multiplicand the row must hold:
//   sy  = 1 for digits +1/-1  (codes 001, 010, 101, 110)
//   s2y = 1 for digits +2/-2  (codes 011, 100)
//   s   = the top bit, which tells the row generator to complement.
// The digit table (-2 for 100, -1 for 101/110, 0 for 000/111, +1 for 001/010,
// +2 for 011) is the standard modified-Booth table. Purely combinational.
module booth_recoder
  import modmul_pkg::*;
(
  input  logic [2:0]  bits,  // {msb, mid, lsb} = {x(2i+1), x(2i), x(2i-1)}
  output booth_sel_t  sel
);

  always_comb begin
    sel.sy  = bits[0] ^ bits[1];
    sel.s2y = (bits[2] ^ bits[1]) & ~(bits[0] ^ bits[1]);
    sel.s   = bits[2];
  end

endmodule
