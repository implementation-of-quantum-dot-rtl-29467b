// bcd_pkg: types shared by the BCD adder blocks.
//
// A BCD digit is a 4-bit binary code for one decimal digit; only the codes
// 0000..1001 (0..9) are valid digit values. The intermediate binary sum of a
// digit position is five bits wide: the 4-bit sum and the binary carry-out of
// the first adder stage. The types carry no logic and no timing.
package bcd_pkg;

  // One BCD digit, valid values 0..9.
  typedef logic [3:0] bcd_digit_t;

  // Binary sum of one digit position before decimal correction:
  // {binary carry-out, 4-bit binary sum}, values 0..19 for valid digit inputs.
  typedef logic [4:0] bin_sum_t;

endpackage
