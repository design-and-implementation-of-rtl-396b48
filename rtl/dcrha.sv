// DCRHA: N-bit delay-controlled reconfigurable hybrid adder (DCHA for N = 4).
//
// Computes {cout, s} = a + b + cin. Bit 0 is an MFA, bits 1 .. N-2 are
// covered by M = (N-2)/2 reconfiguration blocks (COPFA on the odd bit, CISFA on
// the even bit above it), and bit N-1 is again an MFA. The carry ripples
// MFA -> block -> ... -> block -> MFA; inside each block the CISFA receives
// both the regular and the predicted carry of its COPFA. This arrangement and
// the count M are the document's. N must be even (and at least 2), since the
// middle bits come in pairs; an odd N stops elaboration.
//
// The default N = 4 is the document's 4-bit DCHA. Purely combinational.
module dcrha #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned M = dcr_pkg::num_recon_blocks(N);

  if (N < 2 || (N % 2) != 0) begin : g_bad_width
    $error("dcrha: N must be even and at least 2");
  end

  // cb[m] is the carry into block m (bit 2m+1); cb[M] enters the top MFA.
  logic [M:0] cb;

  mfa u_mfa_lsb (
    .a   (a[0]),
    .b   (b[0]),
    .cin (cin),
    .s   (s[0]),
    .cout(cb[0])
  );

  for (genvar m = 0; m < M; m++) begin : g_blk
    recon_block u_blk (
      .a   (a[2*m+2 : 2*m+1]),
      .b   (b[2*m+2 : 2*m+1]),
      .cin (cb[m]),
      .s   (s[2*m+2 : 2*m+1]),
      .cout(cb[m+1])
    );
  end

  mfa u_mfa_msb (
    .a   (a[N-1]),
    .b   (b[N-1]),
    .cin (cb[M]),
    .s   (s[N-1]),
    .cout(cout)
  );

endmodule
