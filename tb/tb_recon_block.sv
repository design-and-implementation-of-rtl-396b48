// Self-checking testbench for recon_block: all 32 combinations of the two bit
// pairs and the carry in, compared with the 2-bit integer sum.
module tb_recon_block;
  logic [1:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  recon_block dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [2:0] exp;
      {a, b, cin} = 5'(v);
      #1;
      exp = 3'(a) + 3'(b) + 3'(cin);
      checks++;
      if ({cout, s} !== exp) begin
        failures++;
        $display("FAIL recon_block a=%0d b=%0d cin=%0d -> %0d, expected %0d", a, b, cin, {cout, s}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
