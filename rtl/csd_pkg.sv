// csd_pkg: types shared by the CSD recoders and the fault tolerant full adder.
//
// sd_digit_t is one signed digit held as two bits {s, d}: d=1 means +1,
// s=1 means -1, both 0 means 0 and both 1 is not a legal digit. The same
// encoding serves the redundant binary (RB) input digits and the canonic
// signed digit (CSD) output digits.
//
// fa_fault_t describes a stuck-at fault placed on the sum and/or carry net of
// the full adder inside a fault tolerant full adder. It exists so that the
// detection and correction logic can be exercised; tie it to '0 in use.
package csd_pkg;

  typedef struct packed {
    logic s;  // digit is -1
    logic d;  // digit is +1
  } sd_digit_t;

  typedef struct packed {
    logic sum_en;    // force the adder's sum net
    logic sum_val;   // value the sum net is stuck at
    logic cout_en;   // force the adder's carry net
    logic cout_val;  // value the carry net is stuck at
  } fa_fault_t;

endpackage
