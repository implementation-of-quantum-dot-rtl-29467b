// bcd_adder_n_check: self-checking driver for one bcd_adder_n of a given
// width, used by tb_bcd_adder_n to test several widths side by side.
//
// It applies directed vectors (zero, the longest carry ripple, the largest
// operands) followed by NRAND random BCD operand pairs with random carry-in.
// Expected results are computed independently of the adder's structure:
// both operands are converted to binary integers, added, and the sum is
// split back into decimal digits and a carry. The per-digit binary sums bs
// are checked against an integer ripple of digit sums.
//
// It also counts how often each mechanism of the adder was exercised: a
// digit corrected by +6, a digit passed without correction, a digit whose
// first-stage binary sum overflowed four bits (16..19), a carry-in of 1, a
// decimal carry-out of 1, and a carry that rippled through every digit.
// When done it raises done; the counters are read through its outputs.
module bcd_adder_n_check
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = 4,
  parameter int unsigned NRAND  = 1000
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_corrected,
  output int   n_uncorrected,
  output int   n_bin_overflow,
  output int   n_carry_in,
  output int   n_carry_out,
  output int   n_full_ripple
);

  localparam int unsigned W = 4 * DIGITS + 4; // 16^D > 10^D, plus headroom

  bcd_digit_t [DIGITS-1:0] a, b, s;
  bin_sum_t   [DIGITS-1:0] bs;
  logic                    c, cout;

  bcd_adder_n #(.DIGITS(DIGITS)) dut (
    .a(a), .b(b), .c(c), .s(s), .cout(cout), .bs(bs)
  );

  function automatic logic [W-1:0] to_bin(input bcd_digit_t [DIGITS-1:0] d);
    logic [W-1:0] v = '0;
    for (int k = DIGITS - 1; k >= 0; k--) v = v * 10 + W'(d[k]);
    return v;
  endfunction

  task automatic apply_and_check();
    logic [W-1:0]            sum;
    bcd_digit_t [DIGITS-1:0] exp_s;
    logic                    exp_cout;
    int                      cy, t;
    bit                      ripple_all;
    #1;
    // Expected decimal result.
    sum = to_bin(a) + to_bin(b) + W'(c);
    for (int k = 0; k < DIGITS; k++) begin
      exp_s[k] = 4'(sum % 10);
      sum      = sum / 10;
    end
    exp_cout = (sum != 0);
    checks++;
    if (s !== exp_s || cout !== exp_cout) begin
      failures++;
      $display("FAIL D=%0d a=%h b=%h c=%b: s=%h cout=%b, expected s=%h cout=%b",
               DIGITS, a, b, c, s, cout, exp_s, exp_cout);
    end
    // Expected per-digit binary sums, and mechanism counts.
    cy = int'(c);
    ripple_all = c;
    for (int k = 0; k < DIGITS; k++) begin
      t = int'(a[k]) + int'(b[k]) + cy;
      checks++;
      if (bs[k] !== 5'(t)) begin
        failures++;
        $display("FAIL D=%0d digit %0d: bs=%0d expected %0d", DIGITS, k, bs[k], t);
      end
      if (t > 9) n_corrected++;
      else       n_uncorrected++;
      if (t > 15) n_bin_overflow++;
      if (a[k] + b[k] != 9) ripple_all = 1'b0;
      cy = (t > 9) ? 1 : 0;
    end
    if (c)    n_carry_in++;
    if (cout) n_carry_out++;
    if (ripple_all) n_full_ripple++;
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    n_corrected = 0;
    n_uncorrected = 0;
    n_bin_overflow = 0;
    n_carry_in = 0;
    n_carry_out = 0;
    n_full_ripple = 0;

    // Zero.
    a = '0; b = '0; c = 1'b0;
    apply_and_check();
    // Carry-in rippling through every digit: 99..9 + 00..0 + 1.
    for (int k = 0; k < DIGITS; k++) begin a[k] = 4'd9; b[k] = 4'd0; end
    c = 1'b1;
    apply_and_check();
    // Alternating digit pairs summing to 9: ripple through every digit.
    for (int k = 0; k < DIGITS; k++) begin a[k] = 4'(k % 10); b[k] = 4'(9 - k % 10); end
    c = 1'b1;
    apply_and_check();
    // Largest operands: 99..9 + 99..9 + 1.
    for (int k = 0; k < DIGITS; k++) begin a[k] = 4'd9; b[k] = 4'd9; end
    c = 1'b1;
    apply_and_check();
    // Random operands.
    for (int n = 0; n < int'(NRAND); n++) begin
      for (int k = 0; k < DIGITS; k++) begin
        a[k] = 4'($urandom_range(9));
        b[k] = 4'($urandom_range(9));
      end
      c = 1'($urandom_range(1));
      apply_and_check();
    end
    done = 1'b1;
  end

endmodule
