// qca_maj3 - three-input majority gate (MG), the basic logic element of
// quantum-dot cellular automata. The output is 1 when at least two of the
// three inputs are 1: y = a.b + a.c + b.c. Fixing one input to 0 turns the
// gate into a 2-input AND, fixing it to 1 turns it into a 2-input OR; the
// adder uses both tricks to form its generate and propagate signals.
// Purely combinational, no clock. The majority function is the standard
// definition of the gate; the adder structure around it follows the
// published 2-bit module, and modelling the gate as a separate module is
// this design's choice so that the gate count stays visible in the netlist.
module qca_maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  always_comb y = (a & b) | (a & c) | (b & c);
endmodule
