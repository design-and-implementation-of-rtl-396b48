// DCRHAS: N-bit delay-controlled reconfigurable hybrid adder/subtractor
// (DCHAS for N = 4).
//
// One hybrid adder chain serves both operations. The mode pin m_sel is XORed
// into every bit of b and is also the carry in of the bit-0 MFA, so
//   m_sel = 0: sd = a + b,       cb = carry out
//   m_sel = 1: sd = a - b,       cb = carry out of a + ~b + 1 (1 = no borrow)
// with sd taken modulo 2^N. The XOR row and the shared chain are the
// document's structure.
//
// The default N = 4 is the document's 4-bit DCHAS. Purely combinational.
module dcrhas #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         m_sel,
  output logic [N-1:0] sd,
  output logic         cb
);

  logic [N-1:0] b_x;  // XOR row: b passed or inverted by m_sel

  assign b_x = b ^ {N{m_sel}};

  dcrha #(.N(N)) u_add (
    .a   (a),
    .b   (b_x),
    .cin (m_sel),
    .s   (sd),
    .cout(cb)
  );

endmodule
