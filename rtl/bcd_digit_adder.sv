// bcd_digit_adder: one-digit BCD adder, built as ADD1 -> CL -> ADD2.
//
// ADD1 adds the BCD digits dA, dB and the carry-in cin in binary, giving the
// 4-bit sum bS and the binary carry bcout. CL raises the decimal carry dcout
// when that sum exceeds nine. ADD2 then adds 0110 to bS when dcout is 1,
// which wraps sums 10..19 back into the digit range, giving dS.
// The three-stage structure is the published one; the whole digit is
// 29 majority gates and 8 inverters.
//
// Ports: dA, dB (BCD digits 0..9), cin; dS (BCD sum digit), dcout (decimal
// carry-out); bS and bcout (the uncorrected binary sum, brought out for
// observation). Results for non-BCD inputs (10..15) are not defined.
// Purely combinational: dcout settles after ADD1 and CL, dS after ADD2.
module bcd_digit_adder
  import bcd_pkg::*;
(
  input  bcd_digit_t dA,
  input  bcd_digit_t dB,
  input  logic       cin,
  output bcd_digit_t dS,
  output logic       dcout,
  output logic [3:0] bS,
  output logic       bcout
);

  add1 u_add1 (.dA(dA), .dB(dB), .cin(cin), .bS(bS), .bcout(bcout));
  cl   u_cl   (.bS(bS[3:1]), .bcout(bcout), .dcout(dcout));
  add2 u_add2 (.bS(bS), .dcout(dcout), .dS(dS));

endmodule
