// tb_clock_zone_pipe: self-check of the clock-zone stage chain.
// The testbench generates the zone switch strobes itself (zone k switches in
// cycles where (cycle - k) mod 4 = 0) and offers a random word, with a random
// valid bit, whenever the first stage's zone switches. Each word must appear
// at the output STAGES-1 cycles after the first stage loaded it, with its
// valid bit, and stay there for four cycles. Words in flight overlap, since
// the chain is longer than one clock cycle.
module tb_clock_zone_pipe;
  localparam int unsigned W = 12, ST = 6, FZ = 1, NZ = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NZ-1:0] zone_switch;
  logic in_valid, out_valid;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  int cyc;

  // Expected output per cycle (cycle mod 32).
  logic         known   [32];
  logic         e_valid [32];
  logic [W-1:0] e_data  [32];

  clock_zone_pipe #(.WIDTH(W), .STAGES(ST), .FIRST_ZONE(FZ), .NUM_ZONES(NZ)) dut (
    .clk, .rst_n, .zone_switch, .in_valid, .in_data, .out_valid, .out_data
  );

  always #5 clk = ~clk;

  always_comb
    for (int k = 0; k < NZ; k++) zone_switch[k] = rst_n && (((cyc - k) % NZ + NZ) % NZ == 0);

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cyc = 0;
    in_valid = 1'b0;
    in_data = '0;
    foreach (known[n]) known[n] = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (cyc = 0; cyc < 200; cyc++) begin
      // Check this cycle's output.
      if (known[cyc % 32]) begin
        checks++;
        if (out_valid !== e_valid[cyc % 32] || (e_valid[cyc % 32] && out_data !== e_data[cyc % 32])) begin
          failures++;
          $display("FAIL cycle %0d out %b/%h expected %b/%h", cyc, out_valid, out_data,
                   e_valid[cyc % 32], e_data[cyc % 32]);
        end
        known[cyc % 32] = 1'b0;
      end else if (cyc < 10) begin
        checks++;
        if (out_valid !== 1'b0) begin
          failures++;
          $display("FAIL cycle %0d valid out of reset", cyc);
        end
      end
      // Offer a word when the first stage's zone switches.
      in_valid = ($urandom % 4) != 0;
      in_data  = W'($urandom);
      if ((cyc - int'(FZ)) % NZ == 0) begin
        // Loaded at the end of this cycle, last stage loads ST-1 cycles later.
        for (int h = 0; h < 4; h++) begin
          known  [(cyc + ST + h) % 32] = 1'b1;
          e_valid[(cyc + ST + h) % 32] = in_valid;
          e_data [(cyc + ST + h) % 32] = in_data;
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
