// majority_gate: three-input majority voter, the basic QCA logic gate.
//
// y = Maj(a,b,c) = ab + ac + bc. Fixing one input to 0 gives a two-input AND,
// fixing it to 1 gives a two-input OR; the converter uses it as an OR with c
// tied to 1. Purely combinational, no timing of its own. The function follows
// the standard QCA majority gate.
module majority_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (a & c) | (b & c);

endmodule
