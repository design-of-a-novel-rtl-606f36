// clock_zone_pipe: a chain of QCA clock-zone stages carrying a data word.
//
// Stage s (s = 0..STAGES-1) belongs to clock zone (FIRST_ZONE + s) mod
// NUM_ZONES. It loads the previous stage's word and valid bit (stage 0 loads
// in_data/in_valid) at the end of a cycle in which its zone is in the switch
// phase, and holds it otherwise, standing in for a row of QCA cells that
// latch in the switch phase and keep their polarization in the hold phase.
// With zone_switch from qca_clock_gen a word advances one stage per clk
// (one phase), so the delay from a stage-0 load to the last stage is STAGES-1
// cycles after that load. Synchronous active-low reset clears the valid bits.
// Modelling a clock zone as a register is this design's choice; the number of
// stages comes from the seven-phase delay of the converter.
module clock_zone_pipe
  import qca_pkg::*;
#(
  parameter int unsigned WIDTH      = NUM_OUTPUTS,
  parameter int unsigned STAGES     = CONVERTER_LATENCY - 1,
  parameter int unsigned FIRST_ZONE = 1,
  parameter int unsigned NUM_ZONES  = NUM_PHASES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_ZONES-1:0] zone_switch,
  input  logic                 in_valid,
  input  logic [WIDTH-1:0]     in_data,
  output logic                 out_valid,
  output logic [WIDTH-1:0]     out_data
);

  logic [WIDTH-1:0] data_q  [STAGES];
  logic             valid_q [STAGES];

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned ZONE = (FIRST_ZONE + s) % NUM_ZONES;
    logic [WIDTH-1:0] d_in;
    logic             v_in;
    if (s == 0) begin : g_first
      assign d_in = in_data;
      assign v_in = in_valid;
    end else begin : g_next
      assign d_in = data_q[s-1];
      assign v_in = valid_q[s-1];
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        valid_q[s] <= 1'b0;
        data_q[s]  <= '0;
      end else if (zone_switch[ZONE]) begin
        valid_q[s] <= v_in;
        data_q[s]  <= d_in;
      end
    end
  end

  assign out_valid = valid_q[STAGES-1];
  assign out_data  = data_q[STAGES-1];

endmodule
