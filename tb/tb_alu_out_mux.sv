// Self-checking testbench for alu_out_mux at N = 4: random unit results under
// every select code; checks which source reaches OUT and where the carry goes.
module tb_alu_out_mux;
  import dcr_pkg::*;
  int checks = 0, failures = 0;

  alu_sel_e   sel;
  logic [3:0] as_sd, logic_y;
  logic       as_cb;
  logic [7:0] mul_p, out;

  alu_out_mux dut (.sel(sel), .as_sd(as_sd), .as_cb(as_cb), .mul_p(mul_p), .logic_y(logic_y), .out(out));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [7:0] exp;
      sel = alu_sel_e'(i % 8);
      as_sd = 4'($urandom); as_cb = 1'($urandom); mul_p = 8'($urandom); logic_y = 4'($urandom);
      #1;
      if (i % 8 <= 1)       exp = {3'b000, as_cb, as_sd};
      else if (i % 8 == 2)  exp = mul_p;
      else                  exp = {4'h0, logic_y};
      checks++;
      if (out !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d -> %h, expected %h", i % 8, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
