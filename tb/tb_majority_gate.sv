// tb_majority_gate: exhaustive self-check of the three-input majority gate.
// All eight input patterns are applied; the expected output is "at least two
// inputs are 1". It also checks the two uses of the gate: c = 0 gives a AND b,
// c = 1 gives a OR b.
module tb_majority_gate;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  majority_gate dut (.a, .b, .c, .y);

  initial begin : watchdog
    #10000;
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
      if (y !== (int'(a) + int'(b) + int'(c) >= 2)) begin
        failures++;
        $display("FAIL maj(%b,%b,%b) = %b", a, b, c, y);
      end
      checks++;
      if (!c && y !== (a && b)) begin
        failures++; $display("FAIL AND use a=%b b=%b y=%b", a, b, y);
      end
      if (c && y !== (a || b)) begin
        failures++; $display("FAIL OR use a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
