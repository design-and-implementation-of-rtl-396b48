// Self-checking testbench for dcrhs. Exhaustive at N = 4 (the 4-bit DCHS) and
// N = 8, random at N = 32. d must equal a - b modulo 2^N and br_out must be 1
// exactly when a >= b (no borrow). Both borrow outcomes must occur.
module tb_dcrhs;
  int checks = 0, failures = 0;
  int borrows = 0, no_borrows = 0;

  logic [3:0]  a4, b4, d4;    logic br4;
  logic [7:0]  a8, b8, d8;    logic br8;
  logic [31:0] a32, b32, d32; logic br32;

  dcrhs           dut4  (.a(a4),  .b(b4),  .d(d4),  .br_out(br4));
  dcrhs #(.N(8))  dut8  (.a(a8),  .b(b8),  .d(d8),  .br_out(br8));
  dcrhs #(.N(32)) dut32 (.a(a32), .b(b32), .d(d32), .br_out(br32));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v); #1;
      checks++;
      if (d4 !== 4'(a4 - b4) || br4 !== (a4 >= b4)) begin
        failures++; $display("FAIL N=4 %0d-%0d -> d=%0d br=%0d", a4, b4, d4, br4);
      end
      if (a4 < b4) borrows++; else no_borrows++;
    end
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v); #1;
      checks++;
      if (d8 !== 8'(a8 - b8) || br8 !== (a8 >= b8)) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %0d-%0d -> d=%0d br=%0d", a8, b8, d8, br8);
      end
    end
    for (int v = 0; v < 20000; v++) begin
      a32 = $urandom; b32 = $urandom;
      if (v == 1) b32 = a32;
      #1;
      checks++;
      if (d32 !== a32 - b32 || br32 !== (a32 >= b32)) begin
        failures++;
        if (failures < 10) $display("FAIL N=32 %0d-%0d -> d=%0d br=%0d", a32, b32, d32, br32);
      end
    end
    checks++;
    if (borrows == 0 || no_borrows == 0) begin
      failures++; $display("FAIL borrow outcomes not both exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
