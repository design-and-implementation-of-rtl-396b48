// Self-checking testbench for logic_unit at N = 4: every operand pair under
// every select code; logic codes give their bitwise result, arithmetic codes 0.
module tb_logic_unit;
  import dcr_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0] a, b, y;
  alu_sel_e   sel;

  logic_unit dut (.a(a), .b(b), .sel(sel), .y(y));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int v = 0; v < 256; v++) begin
        logic [3:0] exp;
        sel = alu_sel_e'(s);
        {a, b} = 8'(v);
        #1;
        case (s)
          4:       exp = a;
          5:       exp = a ^ b;
          6:       exp = a ~^ b;
          3:       exp = a & b;
          7:       exp = a | b;
          default: exp = 4'd0;
        endcase
        checks++;
        if (y !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d a=%h b=%h -> %h, expected %h", s, a, b, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
