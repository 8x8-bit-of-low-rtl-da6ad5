// mult_pkg: types shared by the radix-4 modified Booth multiplier.
// booth_sel_t is the three-wire control word a Booth encoder hands to the
// Booth decoders of its partial-product row: neg (called MI in the truth
// table) asks for the negated multiple, one (X) selects 1x the multiplicand
// and two (X2) selects 2x. one and two are never both set; with both clear
// the row is zero (neg then only adds a carry that the row's half-adder
// chain absorbs).
package mult_pkg;

  typedef struct packed {
    logic neg;  // MI: negate the selected multiple
    logic one;  // X : select 1 x multiplicand
    logic two;  // X2: select 2 x multiplicand
  } booth_sel_t;

endpackage : mult_pkg
