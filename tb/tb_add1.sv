// tb_add1: exhaustive self-checking test of the 4-bit binary adder ADD1.
//
// ADD1 is a plain binary adder, so it is checked over every 4-bit operand
// pair (not only BCD digits) and both carry-in values against the integer
// sum dA + dB + cin, split into the 4-bit sum and the carry-out.
module tb_add1;
  import bcd_pkg::*;

  bcd_digit_t dA, dB;
  logic       cin;
  logic [3:0] bS;
  logic       bcout;
  int         checks = 0;
  int         failures = 0;

  add1 dut (.dA(dA), .dB(dB), .cin(cin), .bS(bS), .bcout(bcout));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int ci = 0; ci < 2; ci++) begin
          dA  = 4'(x);
          dB  = 4'(y);
          cin = 1'(ci);
          #1;
          sum = x + y + ci;
          checks++;
          if ({bcout, bS} !== 5'(sum)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d: got %0d", x, y, ci, {bcout, bS});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
