// DCRHS: N-bit delay-controlled reconfigurable hybrid subtractor (DCHS for N = 4).
//
// Subtracts by two's complement: a row of inverters forms ~b and the hybrid
// adder (MFA, reconfiguration blocks, MFA) computes a + ~b + 1, the carry in
// of the bit-0 MFA being tied to 1. d is a - b modulo 2^N. br_out is the
// carry out of that addition, as the document wires it: it is 1 when no
// borrow occurs (a >= b as unsigned numbers) and 0 when a < b. Reusing the
// adder as the building block is the document's construction.
//
// The default N = 4 is the document's 4-bit DCHS. Purely combinational.
module dcrhs #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] d,
  output logic         br_out
);

  logic [N-1:0] b_n;  // inverter row

  assign b_n = ~b;

  dcrha #(.N(N)) u_add (
    .a   (a),
    .b   (b_n),
    .cin (1'b1),
    .s   (d),
    .cout(br_out)
  );

endmodule
