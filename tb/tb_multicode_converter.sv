// tb_multicode_converter: end-to-end self-check of the clocked converter at
// its default parameters.
//
// The testbench first walks the digits 0..9 in order (the full truth table),
// then sends random digits and bubbles (in_valid low). It changes dec_in in
// every cycle, also while in_ready is low, to show that only the input-zone
// capture matters. Expected codes are computed arithmetically:
// excess-3 = d + 3, BCD = d, Gray = d XOR (d >> 1). A digit captured in a
// cycle with in_ready high must appear with out_valid exactly 7 cycles later
// (seven clock phases) and stay for four cycles; a bubble must give
// out_valid low in the same window. in_ready must be high once every four
// cycles, and zone_phase must follow the four-phase sequence with each zone
// one phase behind the previous one. Mechanisms counted, each of which must
// occur: conversions of every digit, bubbles, input changes ignored while
// in_ready is low, and digits overlapping in flight (a new capture while the
// previous one has not reached the output).
module tb_multicode_converter;
  import qca_pkg::*;
  localparam int unsigned LAT = CONVERTER_LATENCY;
  localparam int unsigned NCYC = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_DIGITS-1:0] dec_in;
  logic in_valid, in_ready, out_valid;
  qca_phase_e [NUM_PHASES-1:0] zone_phase;
  logic [CODE_BITS-1:0] excess3, bcd, gray;

  int checks = 0, failures = 0;
  int cyc;
  int digit_seen [10];
  int n_bubble = 0, n_ignored = 0, n_overlap = 0, n_latency = 0;
  int last_capture = -100;
  int first_capture = -1, first_out = -1;

  // Expected outputs per cycle, indexed by cycle mod 32.
  logic       known   [32];
  logic       e_valid [32];
  logic [3:0] e_x3    [32];
  logic [3:0] e_bcd   [32];
  logic [3:0] e_gray  [32];

  multicode_converter dut (
    .clk, .rst_n, .dec_in, .in_valid, .in_ready, .zone_phase,
    .out_valid, .excess3, .bcd, .gray
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, msg);
    end
  endtask

  initial begin
    int walk;
    int d;
    logic v;
    walk = 0;
    foreach (known[n]) known[n] = 1'b0;
    foreach (digit_seen[n]) digit_seen[n] = 0;
    dec_in = '0;
    in_valid = 1'b0;
    cyc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      // Clock phases: zone k in phase (cycle - k) mod 4, input zone switches at 0.
      for (int k = 0; k < NUM_PHASES; k++)
        check(int'(zone_phase[k]) == ((cyc - k) % 4 + 4) % 4,
              $sformatf("zone %0d phase %0d", k, zone_phase[k]));
      check(in_ready == (cyc % 4 == 0), $sformatf("in_ready %b", in_ready));

      // Outputs.
      if (known[cyc % 32]) begin
        check(out_valid == e_valid[cyc % 32],
              $sformatf("out_valid %b expected %b", out_valid, e_valid[cyc % 32]));
        if (e_valid[cyc % 32]) begin
          check(excess3 == e_x3[cyc % 32],
                $sformatf("excess-3 %b expected %b", excess3, e_x3[cyc % 32]));
          check(bcd == e_bcd[cyc % 32],
                $sformatf("BCD %b expected %b", bcd, e_bcd[cyc % 32]));
          check(gray == e_gray[cyc % 32],
                $sformatf("Gray %b expected %b", gray, e_gray[cyc % 32]));
        end
        known[cyc % 32] = 1'b0;
      end else begin
        check(out_valid == 1'b0, "out_valid before any capture");
      end
      if (out_valid && first_out < 0) first_out = cyc;

      // Next input: digits 0..9 in order first, then random digits and bubbles.
      if (walk < 10) begin
        d = walk;
        v = 1'b1;
      end else begin
        d = int'($urandom % 10);
        v = ($urandom % 5) != 0;
      end
      dec_in   = NUM_DIGITS'(1) << d;
      in_valid = v;
      if (cyc % 4 == 0) begin
        // Captured at the end of this cycle.
        if (v) begin
          digit_seen[d]++;
          if (first_capture < 0) first_capture = cyc;
          if (cyc - last_capture < int'(LAT)) n_overlap++;
          last_capture = cyc;
        end else begin
          n_bubble++;
        end
        if (walk < 10) walk++;
        for (int h = 0; h < 4; h++) begin
          known  [(cyc + LAT + h) % 32] = 1'b1;
          e_valid[(cyc + LAT + h) % 32] = v;
          e_x3   [(cyc + LAT + h) % 32] = 4'(d + 3);
          e_bcd  [(cyc + LAT + h) % 32] = 4'(d);
          e_gray [(cyc + LAT + h) % 32] = 4'(d ^ (d >> 1));
        end
      end else begin
        n_ignored++;
      end
      @(negedge clk);
    end

    // Latency of the first digit, in clock phases (cycles).
    n_latency = first_out - first_capture;
    check(n_latency == int'(LAT), $sformatf("latency %0d phases, expected %0d", n_latency, LAT));

    for (int k = 0; k < 10; k++)
      check(digit_seen[k] > 0, $sformatf("digit %0d never converted", k));
    check(n_bubble > 0,  "no bubble sent");
    check(n_ignored > 0, "no input ignored while in_ready low");
    check(n_overlap > 0, "no digits overlapping in flight");
    $display("conversions per digit: %p", digit_seen);
    $display("bubbles=%0d ignored_inputs=%0d overlaps=%0d latency=%0d phases",
             n_bubble, n_ignored, n_overlap, n_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
