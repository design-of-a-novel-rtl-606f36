// tb_multicode_logic: self-check of the combinational converter.
// Every decimal digit 0..9 is applied as a one-hot input. Expected codes are
// computed arithmetically, independently of the gate equations:
// excess-3 = d + 3, BCD = d, Gray = d XOR (d >> 1). The three worked examples
// of the converter (4 -> excess-3 0111, 6 -> BCD 0110, 8 -> Gray 1100) are
// checked separately, as is the result for no active input (only O8 high).
module tb_multicode_logic;
  import qca_pkg::*;
  logic [NUM_DIGITS-1:0] i;
  logic [CODE_BITS-1:0]  excess3, bcd, gray;
  int checks = 0, failures = 0;

  multicode_logic dut (.i, .excess3, .bcd, .gray);

  task automatic expect4(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 10; d++) begin
      i = NUM_DIGITS'(1) << d;
      #1;
      expect4($sformatf("excess-3 of %0d", d), excess3, 4'(d + 3));
      expect4($sformatf("BCD of %0d", d),      bcd,     4'(d));
      expect4($sformatf("Gray of %0d", d),     gray,    4'(d ^ (d >> 1)));
    end
    // Worked examples.
    i = 10'b00000_10000; #1; expect4("example 4 -> excess-3", excess3, 4'b0111);
    i = 10'b00010_00000; #1; expect4("example 6 -> BCD",      bcd,     4'b0110);
    i = 10'b01000_00000; #1; expect4("example 8 -> Gray",     gray,    4'b1100);
    // No active line: all ORs are 0, only the inverted bit O8 is 1.
    i = '0; #1;
    expect4("idle excess-3", excess3, 4'b0000);
    expect4("idle BCD",      bcd,     4'b0001);
    expect4("idle Gray",     gray,    4'b0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
