// Self-checking testbench for copfa: all eight input combinations. Sum and
// regular carry are compared with a + b + cin; the predicted carry must be 1
// exactly when two or more of a, b, cin are 1.
module tb_copfa;
  logic a, b, cin, s, cout, cout_p;
  int checks = 0, failures = 0;

  copfa dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .cout_p(cout_p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp;
      logic       two_or_more;
      {a, b, cin} = 3'(v);
      #1;
      exp = 2'(a) + 2'(b) + 2'(cin);
      two_or_more = (int'(a) + int'(b) + int'(cin)) >= 2;
      checks++;
      if ({cout, s} !== exp) begin
        failures++;
        $display("FAIL copfa sum/carry a=%0d b=%0d cin=%0d -> %0d%0d", a, b, cin, cout, s);
      end
      checks++;
      if (cout_p !== two_or_more) begin
        failures++;
        $display("FAIL copfa cout_p a=%0d b=%0d cin=%0d -> %0d, expected %0d", a, b, cin, cout_p, two_or_more);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
