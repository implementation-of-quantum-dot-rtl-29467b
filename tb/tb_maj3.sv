// tb_maj3: exhaustive self-checking test of the majority gate.
//
// Applies all eight input combinations and compares the output with "at
// least two inputs are 1", counted independently with $countones.
module tb_maj3;

  logic a, b, c, m;
  int   checks = 0;
  int   failures = 0;

  maj3 dut (.a(a), .b(b), .c(c), .m(m));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (m !== ($countones(3'(v)) >= 2)) begin
        failures++;
        $display("FAIL maj3(%b,%b,%b) = %b", a, b, c, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
