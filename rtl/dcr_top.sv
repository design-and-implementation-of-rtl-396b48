// Top level: the delay-controlled reconfigurable ALU and the stand-alone
// hybrid subtractor.
//
// The ALU (dcr_alu) is the main design: ports a, b, sel and out. The
// document also designs a separate N-bit hybrid subtractor (DCRHS); inside
// the ALU its job is done by the adder/subtractor, so it is placed here next
// to the ALU with its own ports (sub_a, sub_b -> sub_d, sub_br_out) rather
// than wired into the ALU. sel uses the alu_sel_e codes of dcr_pkg.
//
// The default N = 4 matches the document's 4-bit building blocks.
// Purely combinational, no clock.
module dcr_top #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [2:0]     sel,
  output logic [2*N-1:0] out,
  input  logic [N-1:0]   sub_a,
  input  logic [N-1:0]   sub_b,
  output logic [N-1:0]   sub_d,
  output logic           sub_br_out
);

  dcr_alu #(.N(N)) u_alu (
    .a  (a),
    .b  (b),
    .sel(dcr_pkg::alu_sel_e'(sel)),
    .out(out)
  );

  dcrhs #(.N(N)) u_sub (
    .a     (sub_a),
    .b     (sub_b),
    .d     (sub_d),
    .br_out(sub_br_out)
  );

endmodule
