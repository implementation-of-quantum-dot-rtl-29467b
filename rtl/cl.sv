// cl: correction logic (CL) of a BCD digit adder.
//
// Decides whether the binary sum {bcout, bS} of the first adder stage is
// larger than nine, in which case the digit needs the +6 correction and a
// decimal carry goes to the next digit:
//   dcout = bcout | bS3 & (bS2 | bS1)
// It is built from three majority gates:
//   dcout = M( M(1, bcout, bS3), M(bS3, bS2, bS1), bcout )
// With bcout = 1 two inputs of the last gate are 1. With bcout = 0 the last
// gate is an AND of bS3 and M(bS3, bS2, bS1), which is bS3 & (bS2 | bS1).
// bS0 is not needed, so only bS[3:1] is an input. The three-gate structure, with a constant 1 on one of
// the first-level gates, follows the published CL circuit; which signal goes
// to which gate input is this design's own choice.
//
// Ports: bS (bits 3..1 of the binary sum of ADD1), bcout; dcout (decimal carry-out, also the
// correction enable for ADD2). Purely combinational.
module cl (
  input  logic [3:1] bS,
  input  logic       bcout,
  output logic       dcout
);

  logic or_c3; // bcout | bS3
  logic maj_s; // M(bS3, bS2, bS1)

  maj3 u_or  (.a(1'b1),  .b(bcout), .c(bS[3]), .m(or_c3));
  maj3 u_maj (.a(bS[3]), .b(bS[2]), .c(bS[1]), .m(maj_s));
  maj3 u_out (.a(or_c3), .b(maj_s), .c(bcout), .m(dcout));

endmodule
