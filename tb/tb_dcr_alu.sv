// Self-checking testbench for dcr_alu. At N = 4 every operand pair is run
// under all eight select codes; at N = 8 random operands and codes. The
// expected OUT is computed from integer arithmetic and bitwise operators.
module tb_dcr_alu;
  import dcr_pkg::*;
  int checks = 0, failures = 0;
  int op_count [8];

  logic [3:0] a4, b4;  logic [7:0]  out4;  alu_sel_e sel4;
  logic [7:0] a8, b8;  logic [15:0] out8;  alu_sel_e sel8;

  dcr_alu          dut4 (.a(a4), .b(b4), .sel(sel4), .out(out4));
  dcr_alu #(.N(8)) dut8 (.a(a8), .b(b8), .sel(sel8), .out(out8));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref8(logic [7:0] a, logic [7:0] b, int s);
    case (s)
      0: return 16'(a) + 16'(b);
      1: return {7'd0, a >= b, 8'(a - b)};
      2: return 16'(a) * 16'(b);
      3: return {8'd0, a & b};
      4: return {8'd0, a};
      5: return {8'd0, a ^ b};
      6: return {8'd0, a ~^ b};
      default: return {8'd0, a | b};
    endcase
  endfunction

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int v = 0; v < 256; v++) begin
        logic [15:0] r;
        sel4 = alu_sel_e'(s);
        {a4, b4} = 8'(v);
        #1;
        // the 4-bit reference: the 8-bit one on zero-extended operands,
        // with width-dependent results recomputed
        case (s)
          1:       r = {11'd0, a4 >= b4, 4'(a4 - b4)};
          6:       r = {12'd0, a4 ~^ b4};
          default: r = ref8({4'd0, a4}, {4'd0, b4}, s);
        endcase
        checks++;
        op_count[s]++;
        if (out4 !== r[7:0]) begin
          failures++;
          if (failures < 10) $display("FAIL N=4 sel=%0d a=%0d b=%0d -> %h, expected %h", s, a4, b4, out4, r[7:0]);
        end
      end
    end
    for (int i = 0; i < 20000; i++) begin
      int s;
      s = i % 8;
      sel8 = alu_sel_e'(s);
      a8 = 8'($urandom); b8 = 8'($urandom);
      #1;
      checks++;
      if (out8 !== ref8(a8, b8, s)) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 sel=%0d a=%0d b=%0d -> %h, expected %h", s, a8, b8, out8, ref8(a8, b8, s));
      end
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (op_count[s] == 0) begin
        failures++; $display("FAIL select code %0d never exercised", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
