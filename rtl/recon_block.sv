// Reconfiguration block: the two-bit slice of the delay-controlled hybrid adder.
//
// A COPFA adds the lower bit pair (a[0], b[0]) with the incoming carry and
// hands two carries to the CISFA on the upper bit pair (a[1], b[1]): its
// regular carry on the regular-speed path (RSCP) into cin, and its predicted
// carry on the high-speed path (HSCP) into cin_s. The CISFA's carry out leaves
// the block. The pairing is the document's; an N-bit adder repeats the block
// (N-2)/2 times between two MFAs.
//
// Purely combinational, no clock.
module recon_block (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);

  logic c_rscp;  // regular carry, COPFA -> CISFA cin
  logic c_hscp;  // predicted carry, COPFA -> CISFA cin_s

  copfa u_copfa (
    .a     (a[0]),
    .b     (b[0]),
    .cin   (cin),
    .s     (s[0]),
    .cout  (c_rscp),
    .cout_p(c_hscp)
  );

  cisfa u_cisfa (
    .a    (a[1]),
    .b    (b[1]),
    .cin  (c_rscp),
    .cin_s(c_hscp),
    .s    (s[1]),
    .cout (cout)
  );

endmodule
