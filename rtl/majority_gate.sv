// majority_gate: the three-input majority gate, one of the two primitive
// devices of quantum-dot cellular automata.
//
// y = M(a,b,c) = ab + bc + ca. With one input held at 0 the gate is a
// two-input AND, with one input held at 1 a two-input OR. Purely
// combinational; in a QCA layout the gate settles within one clock zone.
module majority_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (b & c) | (c & a);

endmodule
