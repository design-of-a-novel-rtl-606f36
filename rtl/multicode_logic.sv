// multicode_logic: combinational decimal to excess-3 / BCD / Gray converter.
//
// Input i is a one-hot decimal digit (bit k = line Ik). Each output bit is the
// OR of the lines whose digit has a 1 in that position:
//   O1  = I5+I6+I7+I8+I9     O5 = O9 = I8+I9          O9  = I8+I9
//   O2  = I1+I2+I3+I4+I9     O6 = I4+I5+I6+I7         O10 = I4..I9
//   O3  = I0+I3+I4+I7+I8     O7 = I2+I3+I6+I7         O11 = I2+I3+I4+I5
//   O4  = I0+I2+I4+I6+I8     O8 = NOT O4              O12 = I1+I2+I5+I6+I9
// Outputs share logic as the converter's equations intend: O9 is O5; O10 is
// O5 OR O6; O1 is O5 OR the O6 block fed with its inputs shifted up by one
// line (I5..I8); O3 is I0 OR the O7 block fed with inputs shifted up by one
// (I3,I4,I7,I8); O8 is the inverse of O4, valid because exactly one line is
// active. Wide ORs use the programmable four-input block (quad_gate, select
// tied to OR); two-input ORs use a majority gate with one input tied to 1.
// The remaining five-input ORs (O2, O4, O12) are a four-input block plus a
// majority gate: that split is this design's choice, giving eight four-input
// blocks, seven majority gates and one inverter. Purely combinational.
module multicode_logic
  import qca_pkg::*;
(
  input  logic [NUM_DIGITS-1:0] i,
  output logic [CODE_BITS-1:0]  excess3,  // {O1,O2,O3,O4}
  output logic [CODE_BITS-1:0]  bcd,      // {O5,O6,O7,O8}
  output logic [CODE_BITS-1:0]  gray      // {O9,O10,O11,O12}
);

  localparam logic SEL_OR = 1'b1;  // select cell at +1: four-input OR
  localparam logic MAJ_OR = 1'b1;  // majority input at 1: two-input OR

  logic o1, o2, o3, o4, o5, o6, o7, o8, o10, o11, o12;
  logic q_o6s, q_o7s, q_o2, q_o4, q_o12;   // four-input partial ORs

  // BCD bits O6 and O7, and their copies shifted by one input line.
  // The inverted outputs y_n of the blocks are not needed by the converter.
  quad_gate u_o6   (.a(i[4]), .b(i[5]), .c(i[6]), .d(i[7]), .sel(SEL_OR), .y(o6),    .y_n());
  quad_gate u_o6s  (.a(i[5]), .b(i[6]), .c(i[7]), .d(i[8]), .sel(SEL_OR), .y(q_o6s), .y_n());
  quad_gate u_o7   (.a(i[2]), .b(i[3]), .c(i[6]), .d(i[7]), .sel(SEL_OR), .y(o7),    .y_n());
  quad_gate u_o7s  (.a(i[3]), .b(i[4]), .c(i[7]), .d(i[8]), .sel(SEL_OR), .y(q_o7s), .y_n());
  // Gray bit O11, and the four-input parts of O2, O4 and O12.
  quad_gate u_o11  (.a(i[2]), .b(i[3]), .c(i[4]), .d(i[5]), .sel(SEL_OR), .y(o11),   .y_n());
  quad_gate u_o2   (.a(i[1]), .b(i[2]), .c(i[3]), .d(i[4]), .sel(SEL_OR), .y(q_o2),  .y_n());
  quad_gate u_o4   (.a(i[0]), .b(i[2]), .c(i[4]), .d(i[6]), .sel(SEL_OR), .y(q_o4),  .y_n());
  quad_gate u_o12  (.a(i[1]), .b(i[2]), .c(i[5]), .d(i[6]), .sel(SEL_OR), .y(q_o12), .y_n());

  // Two-input ORs on majority gates.
  majority_gate u_o5  (.a(i[8]),  .b(i[9]),  .c(MAJ_OR), .y(o5));   // O5 = O9
  majority_gate u_o1  (.a(o5),    .b(q_o6s), .c(MAJ_OR), .y(o1));
  majority_gate u_o3  (.a(i[0]),  .b(q_o7s), .c(MAJ_OR), .y(o3));
  majority_gate u_o10 (.a(o5),    .b(o6),    .c(MAJ_OR), .y(o10));
  majority_gate u_o2m (.a(q_o2),  .b(i[9]),  .c(MAJ_OR), .y(o2));
  majority_gate u_o4m (.a(q_o4),  .b(i[8]),  .c(MAJ_OR), .y(o4));
  majority_gate u_o12m(.a(q_o12), .b(i[9]),  .c(MAJ_OR), .y(o12));

  // O8 is the complement of O4.
  qca_inverter u_o8 (.a(o4), .y(o8));

  assign excess3 = {o1, o2, o3, o4};
  assign bcd     = {o5, o6, o7, o8};
  assign gray    = {o5, o10, o11, o12};  // O9 is O5

endmodule
