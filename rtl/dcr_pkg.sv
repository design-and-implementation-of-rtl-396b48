// Shared definitions of the delay-controlled reconfigurable ALU.
//
// alu_sel_e encodes the 3-bit select line S[2:0] of the ALU. Codes 000 (add),
// 001 (subtract), 010 (multiply), 100 (buffer A), 101 (XOR), 110 (XNOR) and
// 111 (OR) follow the ALU's operation table. That table gives no operation for
// 011 and lists 110 a second time for AND; this design places AND on the free
// code 011. Bit 0 of the add and subtract codes doubles as the mode input of
// the adder/subtractor (0 add, 1 subtract).
package dcr_pkg;

  typedef enum logic [2:0] {
    SEL_ADD  = 3'b000,
    SEL_SUB  = 3'b001,
    SEL_MUL  = 3'b010,
    SEL_AND  = 3'b011,
    SEL_BUF  = 3'b100,
    SEL_XOR  = 3'b101,
    SEL_XNOR = 3'b110,
    SEL_OR   = 3'b111
  } alu_sel_e;

  // Number of reconfiguration blocks (COPFA + CISFA pairs) in an N-bit
  // hybrid adder: one MFA at each end, the N-2 bits between them in pairs.
  function automatic int unsigned num_recon_blocks(int unsigned n);
    return (n - 2) / 2;
  endfunction

  // Transistor count of an N-bit hybrid adder: 10 per MFA, 24 per block.
  function automatic int unsigned adder_transistors(int unsigned n);
    return 20 + 24 * num_recon_blocks(n);
  endfunction

endpackage
