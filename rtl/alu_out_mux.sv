// ALU output multiplexer.
//
// Chooses the ALU result OUT from the three units by the select code S[2:0]:
//   000, 001  adder/subtractor: {zeros, cb, sd} (carry at bit N)
//   010       multiplier: the full 2N-bit product
//   others    logic unit result, zero-extended
// The selection by S[2:0] is the document's; the 2N-bit width of OUT and the
// placement of the carry at bit N are this design's choices.
//
// Purely combinational, no clock.
module alu_out_mux #(
  parameter int unsigned N = 4
) (
  input  dcr_pkg::alu_sel_e sel,
  input  logic [N-1:0]      as_sd,
  input  logic              as_cb,
  input  logic [2*N-1:0]    mul_p,
  input  logic [N-1:0]      logic_y,
  output logic [2*N-1:0]    out
);

  import dcr_pkg::*;

  always_comb begin
    unique case (sel)
      SEL_ADD, SEL_SUB: out = {{(N-1){1'b0}}, as_cb, as_sd};
      SEL_MUL:          out = mul_p;
      default:          out = {{N{1'b0}}, logic_y};
    endcase
  end

endmodule
