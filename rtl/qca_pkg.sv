// qca_pkg: types and constants shared by the decimal to multicode converter.
//
// The converter takes a decimal digit as ten one-hot lines I0..I9 and drives
// twelve outputs O1..O12: excess-3 on O1-O4, BCD on O5-O8 and Gray code on
// O9-O12, the most significant bit first in each group. The clocked model
// treats one clk period as one QCA clock phase; a QCA clock has four phases
// (switch, hold, release, relax), and the converter's input-to-output delay is
// seven phases. The phase names, the four-phase clock, the code widths and the
// seven-phase delay follow the converter's description; the encoding of the
// phase type is this design's choice.
package qca_pkg;

  // Number of decimal input lines and of outputs per code.
  localparam int unsigned NUM_DIGITS   = 10;
  localparam int unsigned CODE_BITS    = 4;
  localparam int unsigned NUM_CODES    = 3;
  localparam int unsigned NUM_OUTPUTS  = NUM_CODES * CODE_BITS;  // 12

  // QCA clocking: four phases per clock cycle.
  localparam int unsigned NUM_PHASES   = 4;
  // Input-to-output delay of the converter, in clock phases.
  localparam int unsigned CONVERTER_LATENCY = 7;

  typedef enum logic [1:0] {
    PH_SWITCH  = 2'd0,  // barrier rises, cells take the value of their neighbours
    PH_HOLD    = 2'd1,  // barrier high, cells hold their polarization
    PH_RELEASE = 2'd2,  // barrier falls, cells lose their polarization
    PH_RELAX   = 2'd3   // barrier low, cells unpolarized
  } qca_phase_e;

  // The three codes produced for one digit, each {MSB..LSB}.
  typedef struct packed {
    logic [CODE_BITS-1:0] excess3;  // {O1,O2,O3,O4}
    logic [CODE_BITS-1:0] bcd;      // {O5,O6,O7,O8}
    logic [CODE_BITS-1:0] gray;     // {O9,O10,O11,O12}
  } multicode_t;

endpackage
