// tb_add2: self-checking test of the correction adder ADD2.
//
// Without correction (dcout = 0) every 4-bit value must pass unchanged.
// With the decimal carry as CL would set it, every binary sum 0..19 must
// come out as the decimal digit sum mod 10.
module tb_add2;
  import bcd_pkg::*;

  logic [3:0] bS;
  logic       dcout;
  bcd_digit_t dS;
  int         checks = 0;
  int         failures = 0;

  add2 dut (.bS(bS), .dcout(dcout), .dS(dS));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // No correction: a straight wire.
    for (int v = 0; v < 16; v++) begin
      bS    = 4'(v);
      dcout = 1'b0;
      #1;
      checks++;
      if (dS !== 4'(v)) begin
        failures++;
        $display("FAIL bS %0d, no correction: dS = %0d", v, dS);
      end
    end
    // Sums of two BCD digits and a carry.
    for (int v = 0; v <= 19; v++) begin
      bS    = 4'(v);
      dcout = (v > 9);
      #1;
      checks++;
      if (dS !== 4'(v % 10)) begin
        failures++;
        $display("FAIL sum %0d: dS = %0d, expected %0d", v, dS, v % 10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
