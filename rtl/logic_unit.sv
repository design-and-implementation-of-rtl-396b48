// Logic unit: the N-bit logical-operation block of the ALU.
//
// Produces, bit by bit, the logical result chosen by the ALU select code:
// buffer (y = a), XOR, XNOR, AND and OR of a and b. For the arithmetic codes
// (add, subtract, multiply) it outputs zero. The list of operations is the
// document's; it does not give the gates, so plain bitwise operators are used,
// and the AND code 011 is this design's (see dcr_pkg).
//
// Purely combinational, no clock.
module logic_unit #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  input  dcr_pkg::alu_sel_e sel,
  output logic [N-1:0]     y
);

  import dcr_pkg::*;

  always_comb begin
    unique case (sel)
      SEL_BUF:  y = a;
      SEL_XOR:  y = a ^ b;
      SEL_XNOR: y = ~(a ^ b);
      SEL_AND:  y = a & b;
      SEL_OR:   y = a | b;
      default:  y = '0;
    endcase
  end

endmodule
