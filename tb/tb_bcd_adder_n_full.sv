// tb_bcd_adder_n_full: test of bcd_adder_n at its default size (one digit).
//
// Replays the vectors of the published simulation waveform (0+0, 0+1,
// 2+3 with carry-in, 8+9 giving binary sum 17, sum digit 7 and a decimal
// carry), then every pair of BCD digits with both carry-in values, and
// checks sum digit, carry-out and binary sum against integer arithmetic.
// It also requires each mechanism to occur: a +6 correction, no correction,
// a binary sum above 15, and a decimal carry-out.
module tb_bcd_adder_n_full;
  import bcd_pkg::*;

  bcd_digit_t [0:0] a, b, s;
  bin_sum_t   [0:0] bs;
  logic             c, cout;
  int               checks = 0;
  int               failures = 0;
  int               n_corrected = 0, n_uncorrected = 0, n_bin_overflow = 0, n_carry_out = 0;

  bcd_adder_n dut (.a(a), .b(b), .c(c), .s(s), .cout(cout), .bs(bs));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int x, input int y, input int ci);
    int t;
    a[0] = 4'(x);
    b[0] = 4'(y);
    c    = 1'(ci);
    #1;
    t = x + y + ci;
    checks++;
    if (s[0] !== 4'(t % 10) || cout !== (t > 9) || bs[0] !== 5'(t)) begin
      failures++;
      $display("FAIL %0d+%0d+%0d: s=%0d bs=%0d cout=%b", x, y, ci, s[0], bs[0], cout);
    end
    if (t > 9) n_corrected++; else n_uncorrected++;
    if (t > 15) n_bin_overflow++;
    if (cout) n_carry_out++;
  endtask

  initial begin
    // Waveform vectors: (a, b, c) -> (s, bs, cout) as printed.
    apply(0, 0, 0); checks++; if ({s[0], bs[0], cout} !== {4'd0, 5'd0,  1'b0}) failures++;
    apply(0, 1, 0); checks++; if ({s[0], bs[0], cout} !== {4'd1, 5'd1,  1'b0}) failures++;
    apply(2, 3, 1); checks++; if ({s[0], bs[0], cout} !== {4'd6, 5'd6,  1'b0}) failures++;
    apply(8, 9, 0); checks++; if ({s[0], bs[0], cout} !== {4'd7, 5'd17, 1'b1}) failures++;
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        for (int ci = 0; ci < 2; ci++)
          apply(x, y, ci);
    $display("mechanisms: corrected=%0d uncorrected=%0d binary overflow=%0d carry-out=%0d",
             n_corrected, n_uncorrected, n_bin_overflow, n_carry_out);
    checks += 4;
    if (n_corrected == 0)    failures++;
    if (n_uncorrected == 0)  failures++;
    if (n_bin_overflow == 0) failures++;
    if (n_carry_out == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
