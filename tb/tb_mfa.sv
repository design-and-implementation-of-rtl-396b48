// Self-checking testbench for mfa: all eight input combinations, sum and carry
// compared with the integer sum a + b + cin.
module tb_mfa;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  mfa dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp;
      {a, b, cin} = 3'(v);
      #1;
      exp = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, s} !== exp) begin
        failures++;
        $display("FAIL mfa a=%0d b=%0d cin=%0d -> cout=%0d s=%0d, expected %0d", a, b, cin, cout, s, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
