// tb_cl: self-checking test of the correction logic CL.
//
// Drives every binary sum an ADD1 stage can produce from two BCD digits and
// a carry (0..19) and checks that the decimal carry is 1 exactly when the
// sum is above nine.
module tb_cl;

  logic [4:0] sum;
  logic       dcout;
  int         checks = 0;
  int         failures = 0;

  cl dut (.bS(sum[3:1]), .bcout(sum[4]), .dcout(dcout));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 19; v++) begin
      sum = 5'(v);
      #1;
      checks++;
      if (dcout !== (v > 9)) begin
        failures++;
        $display("FAIL sum %0d: dcout = %b", v, dcout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
