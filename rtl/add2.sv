// add2: correction adder (ADD2), last stage of a BCD digit adder.
//
// Adds the correction 0110 to the binary sum bS when dcout is 1 and passes
// bS unchanged when dcout is 0, giving the decimal sum digit dS. The carry
// out of bit 3 is dropped: the decimal carry is dcout itself. Since the
// correction is 0 or 6, the adder is specialised bit by bit into 10
// majority gates and 4 inverters:
//   dS0 = bS0                                   (the correction has bit 0 = 0)
//   g1  = M(bS1, dcout, 0)                      carry into bit 2
//   dS1 = M(~g1, M(bS1, dcout, 1), 0)           bS1 xor dcout
//   c3  = M(bS2, dcout, g1)                     carry into bit 3
//   dS2 = M(~c3, g1, M(bS2, dcout, ~c3))        full-adder sum of bit 2
//   dS3 = M(1, M(~dcout, bS3, 0), M(0, M(~bS3, bS1, 0), dcout))
// The last line uses the fact that only binary sums 0..19 occur: without
// correction dS3 = bS3; with correction a sum 10..15 (bS3 = 1) gives 0..5,
// and a sum 16..19 (bS3 = 0) gives 6..9, whose bit 3 is bS1.
// The gate count, the direct bS0 wire, the XOR of bit 1 and the full-adder
// form of bit 2 follow the published ADD2 circuit; the exact inputs of the
// bit-3 gates are this design's own choice.
//
// Ports: bS (binary sum from ADD1), dcout (from CL); dS (BCD sum digit).
// Purely combinational.
module add2
  import bcd_pkg::*;
(
  input  logic [3:0] bS,
  input  logic       dcout,
  output bcd_digit_t dS
);

  logic g1, o1;            // bit 1: AND and OR of bS1 and dcout
  logic c3, c3_n, t2;      // bit 2: carry out, its inverse, inner sum gate
  logic a3, b3, b3d;       // bit 3 terms

  // Bit 0.
  assign dS[0] = bS[0];

  // Bit 1: exclusive OR as (a | b) & ~(a & b).
  maj3 u_g1  (.a(bS[1]), .b(dcout), .c(1'b0), .m(g1));
  maj3 u_o1  (.a(bS[1]), .b(dcout), .c(1'b1), .m(o1));
  maj3 u_s1  (.a(~g1),   .b(o1),    .c(1'b0), .m(dS[1]));

  // Bit 2: full adder of bS2, dcout and the carry g1.
  maj3 u_c3  (.a(bS[2]), .b(dcout), .c(g1),   .m(c3));
  assign c3_n = ~c3;
  maj3 u_t2  (.a(bS[2]), .b(dcout), .c(c3_n), .m(t2));
  maj3 u_s2  (.a(c3_n),  .b(g1),    .c(t2),   .m(dS[2]));

  // Bit 3.
  maj3 u_a3  (.a(~dcout), .b(bS[3]), .c(1'b0),  .m(a3));
  maj3 u_b3  (.a(~bS[3]), .b(bS[1]), .c(1'b0),  .m(b3));
  maj3 u_b3d (.a(1'b0),   .b(b3),    .c(dcout), .m(b3d));
  maj3 u_s3  (.a(1'b1),   .b(a3),    .c(b3d),   .m(dS[3]));

endmodule
