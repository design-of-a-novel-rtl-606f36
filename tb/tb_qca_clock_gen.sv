// tb_qca_clock_gen: self-check of the four-phase clock sequencer.
// After reset zone 0 must be in its switch phase; every cycle each zone must
// advance switch -> hold -> release -> relax -> switch, zone k must be one
// phase behind zone k-1, and each zone must switch exactly once every four
// cycles. The reference is a cycle count kept by the testbench.
module tb_qca_clock_gen;
  import qca_pkg::*;
  localparam int unsigned NZ = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  qca_phase_e [NZ-1:0] zone_phase;
  logic [NZ-1:0] zone_switch;
  int checks = 0, failures = 0;
  int cyc = 0;
  int sw_count [NZ];

  qca_clock_gen #(.NUM_ZONES(NZ)) dut (.clk, .rst_n, .zone_phase, .zone_switch);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sw_count[k]) sw_count[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;   // first cycle after reset is cycle 0
    for (cyc = 0; cyc < 40; cyc++) begin
      for (int k = 0; k < NZ; k++) begin
        int exp_ph;
        exp_ph = ((cyc - k) % 4 + 4) % 4;
        checks++;
        if (int'(zone_phase[k]) != exp_ph) begin
          failures++;
          $display("FAIL cycle %0d zone %0d phase %0d expected %0d", cyc, k, zone_phase[k], exp_ph);
        end
        checks++;
        if (zone_switch[k] !== (exp_ph == 0)) begin
          failures++;
          $display("FAIL cycle %0d zone %0d switch %b", cyc, k, zone_switch[k]);
        end
        if (zone_switch[k]) sw_count[k]++;
      end
      @(negedge clk);
    end
    for (int k = 0; k < NZ; k++) begin
      checks++;
      if (sw_count[k] != 10) begin
        failures++;
        $display("FAIL zone %0d switched %0d times in 40 cycles", k, sw_count[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
