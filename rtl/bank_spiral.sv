// bank_spiral: spiral bank addressing across the stacked dies.
//
// A particle track through the stack would hit the same bank region of every
// die. To keep one strike from touching the same bank of all dies that hold a
// code word, die d receives bank (b + d) mod NUM_BANKS for logical bank b, so
// the storage of one word spirals through the stack. The mapping is a
// bijection per die, so bank timing can still be tracked per logical bank.
// Combinational; spiral_en_i = 0 sends the logical bank to every die.
// The remapping itself follows the cube description; the rotation by die index
// is this design's reading of the spiral pattern.
module bank_spiral
  import cube_pkg::*;
#(
  parameter int N_DIES = NUM_DIES
) (
  input  logic                       spiral_en_i,
  input  logic [BA_W-1:0]            bank_i,
  output logic [N_DIES-1:0][BA_W-1:0] die_bank_o
);

  always_comb
    for (int d = 0; d < N_DIES; d++)
      die_bank_o[d] = spiral_en_i ? BA_W'(bank_i + BA_W'(d)) : bank_i;

endmodule
