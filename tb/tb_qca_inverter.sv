// tb_qca_inverter: self-check of the NOT gate for both input values.
module tb_qca_inverter;
  logic a, y;
  int checks = 0, failures = 0;

  qca_inverter dut (.a, .y);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      a = v[0];
      #1;
      checks++;
      if (y !== (v == 0)) begin
        failures++;
        $display("FAIL not(%b) = %b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
