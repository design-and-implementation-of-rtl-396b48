// End-to-end testbench of dcr_top at its default size (N = 4), with no
// parameter override. Every operand pair is run through the ALU under all
// eight select codes, and through the stand-alone subtractor. It counts how
// often each mechanism of the design was exercised and fails if one never was:
// each select code, an addition with carry out, a subtraction with and without
// borrow, a product that reaches the upper half of OUT, and a carry that the
// CISFA took from the predicted (high-speed) path.
module tb_dcr_top;
  localparam int N = 4;
  int checks = 0, failures = 0;

  logic [N-1:0]   a, b, sub_a, sub_b, sub_d;
  logic [2:0]     sel;
  logic [2*N-1:0] out;
  logic           sub_br_out;

  int op_count [8];
  int add_carry = 0, sub_borrow = 0, sub_no_borrow = 0, mul_high = 0, hscp_carry = 0;
  int standalone_borrow = 0;

  dcr_top dut (
    .a(a), .b(b), .sel(sel), .out(out),
    .sub_a(sub_a), .sub_b(sub_b), .sub_d(sub_d), .sub_br_out(sub_br_out)
  );

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*N-1:0] expected(logic [N-1:0] x, logic [N-1:0] y, logic [2:0] s);
    case (s)
      3'b000: return (2*N)'(x) + (2*N)'(y);
      3'b001: return (2*N)'({x >= y, N'(x - y)});
      3'b010: return (2*N)'(x) * (2*N)'(y);
      3'b011: return (2*N)'(x & y);
      3'b100: return (2*N)'(x);
      3'b101: return (2*N)'(x ^ y);
      3'b110: return (2*N)'(N'(~(x ^ y)));
      default: return (2*N)'(x | y);
    endcase
  endfunction

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int v = 0; v < (1 << (2 * N)); v++) begin
        logic [2*N-1:0] e;
        logic [N-1:0]   bx;
        sel = 3'(s);
        {a, b} = (2*N)'(v);
        sub_a = a; sub_b = b;
        #1;
        e = expected(a, b, sel);
        checks++;
        op_count[s]++;
        if (out !== e) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%b a=%0d b=%0d -> %h, expected %h", sel, a, b, out, e);
        end
        // stand-alone subtractor
        checks++;
        if (sub_d !== N'(sub_a - sub_b) || sub_br_out !== (sub_a >= sub_b)) begin
          failures++;
          if (failures < 10) $display("FAIL subtractor %0d-%0d -> d=%0d br=%0d", sub_a, sub_b, sub_d, sub_br_out);
        end
        if (s == 0) standalone_borrow += (sub_a < sub_b) ? 1 : 0;
        // mechanism counters
        if (s == 0 && out[N]) add_carry++;
        if (s == 1 && a < b) sub_borrow++;
        if (s == 1 && a >= b) sub_no_borrow++;
        if (s == 2 && out[2*N-1:N] != '0) mul_high++;
        if (s <= 1) begin
          // operand seen by the chain and carry into bit 2 (the CISFA)
          bx = b ^ {N{sel[0]}};
          if (a[2] != bx[2] && (((3'(a[1:0]) + 3'(bx[1:0]) + 3'(sel[0])) >> 2) & 1) != 0)
            hscp_carry++;
        end
      end
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (op_count[s] == 0) begin failures++; $display("FAIL select %0d never used", s); end
    end
    checks++; if (add_carry == 0)         begin failures++; $display("FAIL no addition carry"); end
    checks++; if (sub_borrow == 0)        begin failures++; $display("FAIL no subtraction borrow"); end
    checks++; if (sub_no_borrow == 0)     begin failures++; $display("FAIL no borrow-free subtraction"); end
    checks++; if (mul_high == 0)          begin failures++; $display("FAIL no product above N bits"); end
    checks++; if (hscp_carry == 0)        begin failures++; $display("FAIL predicted carry path never carried"); end
    checks++; if (standalone_borrow == 0) begin failures++; $display("FAIL subtractor never borrowed"); end
    $display("mechanisms: add_carry=%0d sub_borrow=%0d sub_no_borrow=%0d mul_high=%0d hscp_carry=%0d subtractor_borrow=%0d",
             add_carry, sub_borrow, sub_no_borrow, mul_high, hscp_carry, standalone_borrow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
