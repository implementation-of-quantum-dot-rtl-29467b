// add1: 4-bit binary adder (ADD1), first stage of a BCD digit adder.
//
// Adds the two BCD digits dA and dB and the carry-in cin, giving the 4-bit
// binary sum bS and the binary carry-out bcout (bcout = carry c4). The adder
// is a netlist of 16 majority gates (maj3) and 4 inverters.
//
// Carries. Odd carries cross one bit position through one majority gate,
// c(i+1) = M(dA_i, dB_i, c_i). Even carries cross two bit positions through
// a single gate on the carry path:
//   c2 = M(cin, M(dA1, dB1, dA0), M(dA1, dB1, dB0))
//   c4 = M(c2,  M(dA3, dB3, dA2), M(dA3, dB3, dB2))
// This holds because when dA1 = dB1 both inner gates equal dA1 (the pair
// generates or kills the carry) and when dA1 != dB1 they reduce to dA0 and
// dB0, so the outer gate computes M(cin, dA0, dB0) = c1 (the pair
// propagates). The inner gates depend on the operands only, so the carry
// path sees one gate per two bit positions. c3 is taken from c2 through one
// more gate, c3 = M(dA2, dB2, c2).
//
// Sums. Each sum bit is bS_i = M(~c(i+1), c_i, M(dA_i, dB_i, ~c(i+1))),
// the usual majority-gate form of a full-adder sum.
//
// The longest path is cin -> c2 -> c4 -> inverter -> two gates -> bS3:
// five majority gates and one inverter. The carry equations and the gate
// structure follow the published ADD1 circuit; the choice of c3 from c2
// (rather than from c1 through two more gates) is the published one as well.
//
// Ports: dA, dB (BCD digits), cin; bS (4-bit binary sum), bcout.
// Purely combinational.
module add1
  import bcd_pkg::*;
(
  input  bcd_digit_t dA,
  input  bcd_digit_t dB,
  input  logic       cin,
  output logic [3:0] bS,
  output logic       bcout
);

  logic [4:0] c;        // c[0] = cin, c[4] = carry-out
  logic [3:0] c_n;      // inverted carries ~c[i+1]
  logic       g1a, g1b; // operand-only gates of the c2 look-ahead
  logic       g3a, g3b; // operand-only gates of the c4 look-ahead
  logic [3:0] t;        // inner gates of the sum bits

  assign c[0] = cin;

  // Carries.
  maj3 u_c1  (.a(dA[0]), .b(dB[0]), .c(c[0]),  .m(c[1]));
  maj3 u_g1a (.a(dA[1]), .b(dB[1]), .c(dA[0]), .m(g1a));
  maj3 u_g1b (.a(dA[1]), .b(dB[1]), .c(dB[0]), .m(g1b));
  maj3 u_c2  (.a(c[0]),  .b(g1a),   .c(g1b),   .m(c[2]));
  maj3 u_c3  (.a(dA[2]), .b(dB[2]), .c(c[2]),  .m(c[3]));
  maj3 u_g3a (.a(dA[3]), .b(dB[3]), .c(dA[2]), .m(g3a));
  maj3 u_g3b (.a(dA[3]), .b(dB[3]), .c(dB[2]), .m(g3b));
  maj3 u_c4  (.a(c[2]),  .b(g3a),   .c(g3b),   .m(c[4]));

  // Sum bits.
  for (genvar i = 0; i < 4; i++) begin : g_sum
    assign c_n[i] = ~c[i+1];
    maj3 u_t (.a(dA[i]),  .b(dB[i]), .c(c_n[i]), .m(t[i]));
    maj3 u_s (.a(c_n[i]), .b(c[i]),  .c(t[i]),   .m(bS[i]));
  end

  assign bcout = c[4];

endmodule
