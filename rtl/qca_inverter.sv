// qca_inverter: the QCA NOT gate.
//
// y = NOT a. In the converter it is used once, to form BCD bit O8 from
// excess-3 bit O4 (for a single active decimal input the two are always
// complementary). Purely combinational.
module qca_inverter (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
