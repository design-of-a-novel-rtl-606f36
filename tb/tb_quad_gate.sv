// tb_quad_gate: exhaustive self-check of the programmable four-input block.
// For all sixteen data patterns and both select values it compares y with
// the four-input AND (select 0) or OR (select 1), and y_n with its inverse
// (NAND / NOR).
module tb_quad_gate;
  logic a, b, c, d, sel, y, y_n;
  logic exp_y;
  int checks = 0, failures = 0;

  quad_gate dut (.a, .b, .c, .d, .sel, .y, .y_n);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {sel, a, b, c, d} = 5'(v);
      #1;
      exp_y = sel ? (a | b | c | d) : (a & b & c & d);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel=%b abcd=%b%b%b%b y=%b expected %b", sel, a, b, c, d, y, exp_y);
      end
      checks++;
      if (y_n !== !exp_y) begin
        failures++;
        $display("FAIL sel=%b abcd=%b%b%b%b y_n=%b expected %b", sel, a, b, c, d, y_n, !exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
