// multicode_converter: clocked decimal to excess-3 / BCD / Gray converter.
//
// A decimal digit arrives as ten one-hot lines dec_in[k] = Ik. The converter
// produces three 4-bit codes at once: excess-3 {O1..O4}, BCD {O5..O8} and
// Gray {O9..O12}, most significant bit first. It is modelled as a QCA circuit
// clocked in four-phase zones, one clk period per phase (qca_clock_gen).
// The input zone (zone 0) captures dec_in and in_valid at the end of each
// cycle in which in_ready is high, i.e. once every four cycles: one digit per
// QCA clock cycle. The combinational logic (multicode_logic) follows the input
// zone and its twelve results cross six more zones (clock_zone_pipe), so a
// digit presented in a cycle with in_ready high appears on the outputs, with
// out_valid, 7 cycles later (seven phases, 1.75 clock cycles) and stays there
// for four cycles. in_valid low sends a bubble (out_valid low) through.
// zone_phase reports the phase of each of the four clock zones. An assertion
// flags a captured digit that is not one-hot.
// The codes, the equations, the seven-phase delay and the four-phase clock
// follow the converter's description. Where the gates sit among the zones,
// the valid bit and the synchronous active-low reset are this design's
// choices.
module multicode_converter
  import qca_pkg::*;
#(
  parameter int unsigned LATENCY_PHASES = CONVERTER_LATENCY
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NUM_DIGITS-1:0]         dec_in,
  input  logic                          in_valid,
  output logic                          in_ready,
  output qca_phase_e [NUM_PHASES-1:0]   zone_phase,
  output logic                          out_valid,
  output logic [CODE_BITS-1:0]          excess3,
  output logic [CODE_BITS-1:0]          bcd,
  output logic [CODE_BITS-1:0]          gray
);

  logic [NUM_PHASES-1:0] zone_switch;
  logic [NUM_DIGITS-1:0] dec_q;       // input clock zone
  logic                  dec_valid_q;
  multicode_t            codes, codes_out;

  qca_clock_gen #(.NUM_ZONES(NUM_PHASES)) u_clk (
    .clk, .rst_n, .zone_phase, .zone_switch
  );

  assign in_ready = zone_switch[0];

  // Input zone: the decimal input cells.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dec_q       <= '0;
      dec_valid_q <= 1'b0;
    end else if (zone_switch[0]) begin
      dec_q       <= dec_in;
      dec_valid_q <= in_valid;
    end
  end

  // The shared logic (O8 = NOT O4) is only correct for a one-hot digit.
  a_dec_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    (in_ready && in_valid) |-> $onehot(dec_in))
    else $error("captured digit is not one-hot: %b", dec_in);

  multicode_logic u_logic (
    .i(dec_q), .excess3(codes.excess3), .bcd(codes.bcd), .gray(codes.gray)
  );

  clock_zone_pipe #(
    .WIDTH($bits(multicode_t)), .STAGES(LATENCY_PHASES - 1),
    .FIRST_ZONE(1), .NUM_ZONES(NUM_PHASES)
  ) u_zones (
    .clk, .rst_n, .zone_switch,
    .in_valid(dec_valid_q), .in_data(codes),
    .out_valid, .out_data(codes_out)
  );

  assign excess3 = codes_out.excess3;
  assign bcd     = codes_out.bcd;
  assign gray    = codes_out.gray;

endmodule
