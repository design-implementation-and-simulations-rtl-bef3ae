// voting_pkg: types and sizes shared by the voting machine.
//
// The machine counts the YES and NO positions of one three-position switch
// per voter and shows each count as a two-digit decimal number. The number
// of voters (24) is the machine's nominal size; every count fits in five
// bits (0..24) and every displayed count in two decimal digits (00..24).
// The switch encoding below is a choice of this design: the switch itself is
// a mechanical part with one contact per position.
package voting_pkg;

  localparam int unsigned N_VOTERS = 24;   // voters in the assembly
  localparam int unsigned COUNT_W  = 5;    // width of a vote count (0..24)

  // Position of one voter's three-position switch.
  typedef enum logic [1:0] {
    VOTE_NEUTRAL = 2'b00,   // undecided: counted by neither adder tree
    VOTE_YES     = 2'b01,
    VOTE_NO      = 2'b10
  } vote_e;

  // One decimal display: tens digit (0..2) and units digit (0..9), as BCD.
  typedef struct packed {
    logic [3:0] tens;
    logic [3:0] units;
  } bcd2_t;

  // Segment drive of one seven-segment digit, active high, bit 0 = segment a
  // through bit 6 = segment g.
  typedef logic [6:0] seg7_t;

endpackage
