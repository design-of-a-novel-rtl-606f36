// quad_gate: programmable four-input AND/OR block with an inverted output.
//
// A select input programs the block: sel = 0 (polarization -1) makes
// y = a.b.c.d, sel = 1 (polarization +1) makes y = a+b+c+d. The inverted output
// y_n gives NAND and NOR. The AND/OR behaviour and the select input follow the
// block's description; its inside is this design's choice: a seven-input
// majority vote in which the select value counts three times. With sel = 0 all
// four data inputs are needed to reach four votes, with sel = 1 a single one
// suffices. Purely combinational.
module quad_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic sel,
  output logic y,
  output logic y_n
);

  logic [2:0] votes;  // number of 1s among the seven majority inputs

  always_comb begin
    // Majority of seven inputs {a,b,c,d,sel,sel,sel}: at least four must be 1.
    votes = 3'(a) + 3'(b) + 3'(c) + 3'(d) + (sel ? 3'd3 : 3'd0);
    y     = votes >= 3'd4;
    y_n   = ~y;
  end

endmodule
