// DCRAM: N x N delay-controlled reconfigurable array multiplier (DCAM for N = 4).
//
// Forms all N^2 partial products pp[n][m] = a[m] & b[n] with AND gates and
// reduces them with N-1 stages of the N-bit hybrid adder (DCRHA):
//   stage 0 adds {1'b0, pp[0][N-1:1]} and pp[1][N-1:0];
//   stage k adds the upper N bits of stage k-1 ({carry, sum[N-1:1]}) and
//   pp[k+1][N-1:0].
// The product bits are p[0] = pp[0][0], p[k+1] = sum bit 0 of stage k, and the
// last stage's sum[N-1:1] and carry give the top N bits. The carry in of every
// stage is 0. This is the document's array; the unsigned operand
// convention and the zero carry inputs are this design's reading of it.
//
// The default N = 4 is the document's 4-bit DCAM (three 4-bit adders).
// N must be even and at least 2, as for the adder. Purely combinational.
module dcram #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // Partial products, row n holds b[n] & a[N-1:0].
  logic [N-1:0] pp [N];

  for (genvar n = 0; n < N; n++) begin : g_pp
    assign pp[n] = a & {N{b[n]}};
  end

  // acc[k] is the N-bit addend carried into stage k (upper bits of the
  // previous stage); st_s / st_c are each stage's sum and carry out.
  logic [N-1:0] acc  [N-1];
  logic [N-1:0] st_s [N-1];
  logic         st_c [N-1];

  assign acc[0] = {1'b0, pp[0][N-1:1]};
  assign p[0]   = pp[0][0];

  for (genvar k = 0; k < N - 1; k++) begin : g_stage
    dcrha #(.N(N)) u_add (
      .a   (acc[k]),
      .b   (pp[k+1]),
      .cin (1'b0),
      .s   (st_s[k]),
      .cout(st_c[k])
    );
    assign p[k+1] = st_s[k][0];
    if (k < N - 2) begin : g_next
      assign acc[k+1] = {st_c[k], st_s[k][N-1:1]};
    end
  end

  assign p[2*N-1:N] = {st_c[N-2], st_s[N-2][N-1:1]};

endmodule
