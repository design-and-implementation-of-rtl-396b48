// COPFA: carry-output-predictable full adder.
//
// The MFA's XOR gate is replaced by an XOR-AND module that also delivers
// A AND B, the temporary carry. Sum and regular carry are formed exactly as in
// the MFA: MUX21-A (select cin) chooses A^B or A XNOR B, MUX21-B (select
// A XNOR B) chooses cin or B. The predicted carry cout_p is the "two or more
// ones among A, B and cin" signal, built from the temporary carry and the XOR
// output: cout_p = (A & B) | (cin & (A ^ B)). It feeds the selectable carry
// input of the following CISFA over the short (HSCP) path, while cout feeds
// its regular input over the RSCP path.
//
// The document draws cout_p from the XOR-AND block alone (A AND B); that
// literal reading does not add correctly inside the hybrid adder, so this
// design uses the two-or-more-ones form that the document's prose describes.
// With it cout_p always equals cout.
//
// Purely combinational, no clock.
module copfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout,
  output logic cout_p
);

  logic x_ab;   // XOR output of the XOR-AND module
  logic g_ab;   // AND output of the XOR-AND module (temporary carry)
  logic xn_ab;  // inverter output

  assign x_ab  = a ^ b;
  assign g_ab  = a & b;
  assign xn_ab = ~x_ab;

  // MUX21-A: sum, select = cin
  assign s      = cin ? xn_ab : x_ab;
  // MUX21-B: regular carry, select = A xnor B
  assign cout   = xn_ab ? b : cin;
  // Predicted carry: temporary carry, or a propagated carry in
  assign cout_p = g_ab | (x_ab & cin);

endmodule
