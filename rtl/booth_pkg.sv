// booth_pkg: types shared by the radix-4 modified Booth multiplier.
//
// booth_sel_t is the bundle one Booth encoder hands to one row of Booth
// decoders. The field names follow the encoder's signal names:
//   zero - despite its name, 1 when the digit is +1 or -1 (the multiplicand
//          is selected unshifted); it is 0 for digits 0, +2 and -2.
//   two  - 1 when the digit is +2 or -2 (the multiplicand is selected shifted
//          left by one place).
//   neg  - 1 when the digit is negative (the selected multiple is inverted;
//          the missing +1 of the two's complement is added in the adder tree).
// final_adder_e selects the carry-propagate adder at the end of the datapath:
// the ripple carry adder is the main configuration, the carry select adder
// (block carry generator plus sum selector) is the alternative drawn in the
// stage diagram.
package booth_pkg;

  typedef struct packed {
    logic neg;
    logic two;
    logic zero;
  } booth_sel_t;

  typedef enum logic {
    FA_RIPPLE       = 1'b0,
    FA_CARRY_SELECT = 1'b1
  } final_adder_e;

endpackage
