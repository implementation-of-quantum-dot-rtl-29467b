// bcd_adder_n: n-digit BCD adder, a ripple chain of one-digit BCD adders.
//
// Digit k adds a[k], b[k] and the decimal carry of digit k-1 (c for digit 0)
// and passes its own decimal carry to digit k+1; the carry of the last digit
// is cout. The chain of digits is the published n-digit structure. Inside a
// digit the carry crosses ADD1 (two majority gates from cin to bcout) and CL,
// so the path grows by a fixed number of gates per digit.
//
// Parameter DIGITS is the number of decimal digits. Its default, 1, is the
// configuration that was simulated and synthesised for the published results
// (inputs a, b, c and outputs s, bs, cout); DIGITS = 32 gives a 128-bit
// operand width.
//
// Ports, digit 0 least significant:
//   a, b  DIGITS BCD digits each (values 0..9 per digit)
//   c     carry-in
//   s     DIGITS BCD sum digits
//   cout  decimal carry-out of the most significant digit
//   bs    per digit, the uncorrected binary sum {bcout, bS}, 0..19
// Purely combinational; no clock, no reset.
module bcd_adder_n
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = 1
) (
  input  bcd_digit_t [DIGITS-1:0] a,
  input  bcd_digit_t [DIGITS-1:0] b,
  input  logic                    c,
  output bcd_digit_t [DIGITS-1:0] s,
  output logic                    cout,
  output bin_sum_t   [DIGITS-1:0] bs
);

  logic [DIGITS:0] carry; // carry[k] enters digit k

  assign carry[0] = c;

  for (genvar k = 0; k < DIGITS; k++) begin : g_digit
    logic [3:0] bsum;
    logic       bc;

    bcd_digit_adder u_digit (
      .dA   (a[k]),
      .dB   (b[k]),
      .cin  (carry[k]),
      .dS   (s[k]),
      .dcout(carry[k+1]),
      .bS   (bsum),
      .bcout(bc)
    );

    assign bs[k] = {bc, bsum};
  end

  assign cout = carry[DIGITS];

endmodule
