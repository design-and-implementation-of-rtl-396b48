// DCR-ALU: N-bit delay-controlled reconfigurable ALU.
//
// Three units see the operands a and b at the same time: the hybrid
// adder/subtractor DCRHAS, whose mode pin is S[0] (0 add, 1 subtract), the
// array multiplier DCRAM, and the logic unit. An output multiplexer driven by
// S[2:0] picks OUT:
//   000 a + b      001 a - b      010 a * b      011 a & b
//   100 a          101 a ^ b      110 ~(a ^ b)   111 a | b
// For add and subtract OUT[N] is the adder's carry (for subtract, 1 means no
// borrow); the product uses all 2N bits; logic results are zero-extended.
// The unit list, their wiring and the codes come from the document, apart
// from AND on 011, the 2N-bit output and the carry at bit N, which are this
// design's choices.
//
// The default N = 4 matches the document's 4-bit building blocks; N must be
// even. Purely combinational: a result is valid once the longest path (the
// multiplier's N-1 ripple stages) has settled.
module dcr_alu #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  input  dcr_pkg::alu_sel_e sel,
  output logic [2*N-1:0]    out
);

  logic [N-1:0]   as_sd;
  logic           as_cb;
  logic [2*N-1:0] mul_p;
  logic [N-1:0]   logic_y;

  dcrhas #(.N(N)) u_addsub (
    .a    (a),
    .b    (b),
    .m_sel(sel[0]),
    .sd   (as_sd),
    .cb   (as_cb)
  );

  dcram #(.N(N)) u_mul (
    .a(a),
    .b(b),
    .p(mul_p)
  );

  logic_unit #(.N(N)) u_logic (
    .a  (a),
    .b  (b),
    .sel(sel),
    .y  (logic_y)
  );

  alu_out_mux #(.N(N)) u_mux (
    .sel    (sel),
    .as_sd  (as_sd),
    .as_cb  (as_cb),
    .mul_p  (mul_p),
    .logic_y(logic_y),
    .out    (out)
  );

endmodule
