// hylo_pkg: types shared by the HYLO approximate multiplier.
//
// booth_digit_t is the radix-4 Booth digit of a bit triple {b[i+1], b[i], b[i-1]},
// value -2*b[i+1] + b[i] + b[i-1], carried as three select lines: `neg` (the digit is
// negative), `one` (|digit| = 1) and `two` (|digit| = 2). A digit with neither `one` nor
// `two` set is zero whatever `neg` says. The select-line form is the usual recoding of
// radix-4 Booth multipliers; the digit formula is the one the HYLO scheme defines for
// its most significant segment.
package hylo_pkg;

  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_digit_t;

endpackage
