// CISFA: carry-input-selectable full adder.
//
// Besides the regular carry in (cin) the cell has a selectable carry in
// (cin_s). MUX21-A, steered by A^B, passes cin when the operand bits are equal
// and cin_s when they differ; its output OUT_A then plays the role of the
// carry in of an MFA: MUX21-B (select OUT_A) chooses A^B or A XNOR B as the
// sum, MUX21-C (select A XNOR B) chooses OUT_A or B as the carry out. The
// selection rule follows the cell's defining equation and transistor
// schematic; the document's prose states the opposite rule.
//
// In the hybrid adder, cin is the COPFA's regular carry (RSCP) and cin_s its
// predicted carry (HSCP). Purely combinational, no clock.
module cisfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic cin_s,
  output logic s,
  output logic cout
);

  logic x_ab;
  logic xn_ab;
  logic out_a;  // MUX21-A output, the selected carry

  assign x_ab  = a ^ b;
  assign xn_ab = ~x_ab;

  // MUX21-A: select = A xor B
  assign out_a = x_ab ? cin_s : cin;
  // MUX21-B: sum, select = OUT_A
  assign s     = out_a ? xn_ab : x_ab;
  // MUX21-C: carry, select = A xnor B
  assign cout  = xn_ab ? b : out_a;

endmodule
