// Partial product adder ("k:1 adder"): sums COUNT integers modulo 2^WIDTH.
//
// The operands are added by a tree of adder_cells (two carry-save adders and a
// delayed carry adder each, seven inputs to one output). Level 0 is the
// operands themselves; each further level groups the previous level's values
// by seven, padding the last group with zeros, and gives each group one cell,
// until a single value is left. For the 514 rows of a 1026-bit multiplier
// that is 74 + 11 + 2 + 1 cells in four levels. Combinational.
module pp_adder #(
  parameter int unsigned COUNT = 514,
  parameter int unsigned WIDTH = 2052
) (
  input  logic [COUNT-1:0][WIDTH-1:0] pp,
  output logic [WIDTH-1:0]            sum
);

  // Number of values at tree level l.
  function automatic int unsigned count_at(int unsigned l);
    int unsigned c = COUNT;
    for (int unsigned i = 0; i < l; i++) c = (c + 6) / 7;
    return c;
  endfunction

  // Number of levels below the single final value.
  function automatic int unsigned levels();
    int unsigned c = COUNT, l = 0;
    while (c > 1) begin
      c = (c + 6) / 7;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = levels();

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned C = count_at(l);
    logic [C-1:0][WIDTH-1:0] vals;

    if (l == 0) begin : g_operands
      assign vals = pp;
    end else begin : g_cells
      localparam int unsigned PREV = count_at(l - 1);
      for (genvar c = 0; c < C; c++) begin : g_cell
        logic [6:0][WIDTH-1:0] ins;
        for (genvar j = 0; j < 7; j++) begin : g_in
          if (7 * c + j < PREV) begin : g_used
            assign ins[j] = g_lvl[l-1].vals[7*c+j];
          end else begin : g_pad
            assign ins[j] = '0;
          end
        end
        adder_cell #(.WIDTH(WIDTH)) u_cell (
          .pp  (ins),
          .sum (vals[c])
        );
      end
    end
  end

  assign sum = g_lvl[LEVELS].vals[0];

endmodule
