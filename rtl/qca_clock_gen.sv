// qca_clock_gen: four-phase QCA clock sequencer for NUM_ZONES clock zones.
//
// QCA logic is clocked in zones; each zone cycles through switch, hold,
// release and relax, and a zone takes in the value of the zone before it
// during its switch phase. Here one clk period is one phase. A two-bit phase
// counter advances every cycle; zone k runs k phases behind zone 0, so a value
// moves forward one zone per phase and a complete clock cycle is four phases.
// Outputs: zone_phase[k] is zone k's current phase, zone_switch[k] is high
// while zone k is in its switch phase (its storage loads at the end of that
// cycle). Reset (synchronous, active low) puts zone 0 in its switch phase.
// The four phases and their order follow the QCA clocking scheme; the
// one-phase lag between neighbouring zones and the reset state are this
// design's choices.
module qca_clock_gen
  import qca_pkg::*;
#(
  parameter int unsigned NUM_ZONES = NUM_PHASES
) (
  input  logic                               clk,
  input  logic                               rst_n,
  output qca_phase_e [NUM_ZONES-1:0]         zone_phase,
  output logic       [NUM_ZONES-1:0]         zone_switch
);

  logic [1:0] phase_cnt;  // phase of zone 0

  always_ff @(posedge clk) begin
    if (!rst_n) phase_cnt <= 2'd0;
    else        phase_cnt <= phase_cnt + 2'd1;
  end

  always_comb begin
    for (int unsigned k = 0; k < NUM_ZONES; k++) begin
      zone_phase[k]  = qca_phase_e'(phase_cnt - 2'(k));
      zone_switch[k] = (zone_phase[k] == PH_SWITCH);
    end
  end

endmodule
