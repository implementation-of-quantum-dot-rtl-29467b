// tb_bcd_digit_adder: exhaustive self-checking test of the one-digit BCD
// adder.
//
// All 200 combinations of two BCD digits and a carry-in are applied. The
// decimal sum digit and carry are compared with (x + y + c) mod 10 and
// div 10; the intermediate binary sum with x + y + c.
module tb_bcd_digit_adder;
  import bcd_pkg::*;

  bcd_digit_t dA, dB, dS;
  logic       cin, dcout, bcout;
  logic [3:0] bS;
  int         checks = 0;
  int         failures = 0;

  bcd_digit_adder dut (
    .dA(dA), .dB(dB), .cin(cin),
    .dS(dS), .dcout(dcout), .bS(bS), .bcout(bcout)
  );

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        for (int ci = 0; ci < 2; ci++) begin
          dA  = 4'(x);
          dB  = 4'(y);
          cin = 1'(ci);
          #1;
          sum = x + y + ci;
          checks++;
          if (dS !== 4'(sum % 10) || dcout !== (sum >= 10)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d: dS=%0d dcout=%b", x, y, ci, dS, dcout);
          end
          checks++;
          if ({bcout, bS} !== 5'(sum)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d: binary sum %0d", x, y, ci, {bcout, bS});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
