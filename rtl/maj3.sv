// maj3: three-input majority gate, y = 1 when at least two inputs are 1.
//
// The majority gate is the basic logic element of quantum-dot cellular
// automata: with one input tied to 0 it is a two-input AND, tied to 1 it is a
// two-input OR. The round-robin arbiter builds its priority chain out of this
// gate (plus inversion) so that its netlist maps one-to-one onto a QCA
// layout. Purely combinational; no clock.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  assign y = (a & b) | (a & c) | (b & c);

endmodule
