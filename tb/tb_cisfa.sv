// Self-checking testbench for cisfa: all sixteen combinations of a, b, cin and
// cin_s. The expected values follow the cell equations: the selected carry is
// cin when a == b and cin_s when a != b; the sum is a ^ b ^ selected carry;
// the carry out is b when a == b and the selected carry otherwise. With
// cin == cin_s the cell must behave as a plain full adder.
module tb_cisfa;
  logic a, b, cin, cin_s, s, cout;
  int checks = 0, failures = 0;
  int hscp_used = 0;

  cisfa dut (.a(a), .b(b), .cin(cin), .cin_s(cin_s), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic sel_c, exp_s, exp_c;
      {a, b, cin, cin_s} = 4'(v);
      #1;
      sel_c = (a == b) ? cin : cin_s;
      exp_s = a ^ b ^ sel_c;
      exp_c = (a == b) ? b : sel_c;
      if (a != b && cin != cin_s) hscp_used++;
      checks++;
      if (s !== exp_s || cout !== exp_c) begin
        failures++;
        $display("FAIL cisfa a=%0d b=%0d cin=%0d cin_s=%0d -> s=%0d cout=%0d, expected s=%0d cout=%0d",
                 a, b, cin, cin_s, s, cout, exp_s, exp_c);
      end
      if (cin == cin_s) begin
        checks++;
        if ({cout, s} !== 2'(a) + 2'(b) + 2'(cin)) begin
          failures++;
          $display("FAIL cisfa as full adder a=%0d b=%0d c=%0d", a, b, cin);
        end
      end
    end
    checks++;
    if (hscp_used == 0) begin
      failures++;
      $display("FAIL cisfa: selectable carry never decided the result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
