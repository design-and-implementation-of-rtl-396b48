// MFA: modified full adder built from multiplexer selection logic.
//
// An XOR gate and an inverter produce A^B and its complement A XNOR B. The sum
// multiplexer is steered by the carry in: it passes A^B when cin = 0 and
// A XNOR B when cin = 1, which is A^B^cin. The carry multiplexer is steered by
// A XNOR B: when the operand bits differ it passes the carry in, when they are
// equal it passes B (both bits are then the carry). The structure (XOR, NOT,
// two 2:1 multiplexers) is the document's; only the gate-level function is
// modelled, not the ten-transistor FinFET/GnrFET circuit.
//
// Purely combinational, no clock.
module mfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic x_ab;   // A xor B
  logic xn_ab;  // A xnor B, the inverter output

  assign x_ab  = a ^ b;
  assign xn_ab = ~x_ab;

  // Sum MUX21, select = cin
  assign s    = cin ? xn_ab : x_ab;
  // Carry MUX21, select = A xnor B
  assign cout = xn_ab ? b : cin;

endmodule
