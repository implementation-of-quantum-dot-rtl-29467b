// tb_bcd_adder_n: end-to-end test of the n-digit BCD adder.
//
// Three adders are tested side by side: the one-digit default, four digits,
// and 32 digits (128-bit operands). The one-digit adder is driven through
// every pair of BCD digits with both carry-in values, including the four
// vectors of the published simulation waveform (0+0, 0+1, 2+3 with carry-in,
// 8+9); the wider adders through directed and random vectors (see
// bcd_adder_n_check). Each mechanism of the design must occur at least once
// over the whole run, or a failure is counted: +6 correction of a digit, a
// digit left uncorrected, a first-stage binary sum above 15, a carry-in, a
// decimal carry-out, and a carry rippling through every digit.
module tb_bcd_adder_n;
  import bcd_pkg::*;

  int checks = 0;
  int failures = 0;
  int n_corrected = 0, n_uncorrected = 0, n_bin_overflow = 0;
  int n_carry_in = 0, n_carry_out = 0, n_full_ripple = 0;

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------------
  // One digit, exhaustive.
  bcd_digit_t [0:0] a1, b1, s1;
  bin_sum_t   [0:0] bs1;
  logic             c1, cout1;
  logic             done1 = 1'b0;
  int               checks1 = 0, failures1 = 0;

  bcd_adder_n #(.DIGITS(1)) dut1 (
    .a(a1), .b(b1), .c(c1), .s(s1), .cout(cout1), .bs(bs1)
  );

  task automatic check1(input int x, input int y, input int ci);
    int t;
    a1[0] = 4'(x);
    b1[0] = 4'(y);
    c1    = 1'(ci);
    #1;
    t = x + y + ci;
    checks1++;
    if (s1[0] !== 4'(t % 10) || cout1 !== (t > 9) || bs1[0] !== 5'(t)) begin
      failures1++;
      $display("FAIL D=1 %0d+%0d+%0d: s=%0d bs=%0d cout=%b", x, y, ci, s1[0], bs1[0], cout1);
    end
  endtask

  initial begin
    // Waveform vectors with their printed results.
    check1(0, 0, 0);
    checks1++; if (s1[0] !== 4'd0 || bs1[0] !== 5'd0  || cout1 !== 1'b0) failures1++;
    check1(0, 1, 0);
    checks1++; if (s1[0] !== 4'd1 || bs1[0] !== 5'd1  || cout1 !== 1'b0) failures1++;
    check1(2, 3, 1);
    checks1++; if (s1[0] !== 4'd6 || bs1[0] !== 5'd6  || cout1 !== 1'b0) failures1++;
    check1(8, 9, 0);
    checks1++; if (s1[0] !== 4'd7 || bs1[0] !== 5'd17 || cout1 !== 1'b1) failures1++;
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        for (int ci = 0; ci < 2; ci++) begin
          check1(x, y, ci);
          if (x + y + ci > 9) n_corrected++; else n_uncorrected++;
          if (x + y + ci > 15) n_bin_overflow++;
          if (ci == 1) n_carry_in++;
          if (cout1) n_carry_out++;
          if (ci == 1 && x + y == 9) n_full_ripple++;
        end
    done1 = 1'b1;
  end

  // ---------------------------------------------------------------------
  // Four and 32 digits.
  logic done4, done32;
  int   ch4, f4, cor4, unc4, ovf4, cin4, cout4, rip4;
  int   ch32, f32, cor32, unc32, ovf32, cin32, cout32, rip32;

  bcd_adder_n_check #(.DIGITS(4), .NRAND(2000)) u_chk4 (
    .done(done4), .checks(ch4), .failures(f4),
    .n_corrected(cor4), .n_uncorrected(unc4), .n_bin_overflow(ovf4),
    .n_carry_in(cin4), .n_carry_out(cout4), .n_full_ripple(rip4)
  );

  bcd_adder_n_check #(.DIGITS(32), .NRAND(1000)) u_chk32 (
    .done(done32), .checks(ch32), .failures(f32),
    .n_corrected(cor32), .n_uncorrected(unc32), .n_bin_overflow(ovf32),
    .n_carry_in(cin32), .n_carry_out(cout32), .n_full_ripple(rip32)
  );

  // ---------------------------------------------------------------------
  initial begin
    #1;
    wait (done1 && done4 && done32);
    checks   = checks1 + ch4 + ch32;
    failures = failures1 + f4 + f32;
    n_corrected    += cor4 + cor32;
    n_uncorrected  += unc4 + unc32;
    n_bin_overflow += ovf4 + ovf32;
    n_carry_in     += cin4 + cin32;
    n_carry_out    += cout4 + cout32;
    n_full_ripple  += rip4 + rip32;
    $display("mechanisms: corrected digits=%0d uncorrected digits=%0d binary overflow=%0d",
             n_corrected, n_uncorrected, n_bin_overflow);
    $display("mechanisms: carry-in=%0d carry-out=%0d full ripple=%0d",
             n_carry_in, n_carry_out, n_full_ripple);
    checks += 6;
    if (n_corrected == 0)    begin failures++; $display("FAIL no digit was corrected"); end
    if (n_uncorrected == 0)  begin failures++; $display("FAIL no digit went uncorrected"); end
    if (n_bin_overflow == 0) begin failures++; $display("FAIL no binary sum above 15"); end
    if (n_carry_in == 0)     begin failures++; $display("FAIL no carry-in"); end
    if (n_carry_out == 0)    begin failures++; $display("FAIL no carry-out"); end
    if (n_full_ripple == 0)  begin failures++; $display("FAIL no full carry ripple"); end
    // The 32-digit run must have seen the carry cross all digits.
    checks++;
    if (rip32 == 0) begin failures++; $display("FAIL no 32-digit ripple"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
