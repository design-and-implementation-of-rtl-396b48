// Self-checking testbench for dcrha. Exhaustive at N = 2, 4 (the 4-bit DCHA)
// and 8 (every a, b and carry in), random at N = 16. Each result is compared
// with the integer sum a + b + cin. It also counts the cases in which a CISFA
// takes its carry from the predicted (high-speed) path with a carry in of 1,
// and fails if that never happened.
module tb_dcrha;
  int checks = 0, failures = 0;
  int hscp_events = 0;

  logic [1:0]  a2, b2, s2;   logic c2, co2;
  logic [3:0]  a4, b4, s4;   logic c4, co4;
  logic [7:0]  a8, b8, s8;   logic c8, co8;
  logic [15:0] a16, b16, s16; logic c16, co16;

  dcrha #(.N(2))  dut2  (.a(a2),  .b(b2),  .cin(c2),  .s(s2),  .cout(co2));
  dcrha           dut4  (.a(a4),  .b(b4),  .cin(c4),  .s(s4),  .cout(co4));
  dcrha #(.N(8))  dut8  (.a(a8),  .b(b8),  .cin(c8),  .s(s8),  .cout(co8));
  dcrha #(.N(16)) dut16 (.a(a16), .b(b16), .cin(c16), .s(s16), .cout(co16));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carry into bit i of a + b + cin, computed arithmetically.
  function automatic logic carry_into(longint unsigned a, longint unsigned b, bit cin, int i);
    longint unsigned mask = (64'd1 << i) - 1;
    return 1'((((a & mask) + (b & mask) + 64'(cin)) >> i) & 64'd1);
  endfunction

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a2, b2, c2} = 5'(v); #1;
      checks++;
      if ({co2, s2} !== 3'(a2) + 3'(b2) + 3'(c2)) begin
        failures++; $display("FAIL N=2 %0d+%0d+%0d", a2, b2, c2);
      end
    end
    for (int v = 0; v < 512; v++) begin
      {a4, b4, c4} = 9'(v); #1;
      checks++;
      if ({co4, s4} !== 5'(a4) + 5'(b4) + 5'(c4)) begin
        failures++; $display("FAIL N=4 %0d+%0d+%0d -> %0d", a4, b4, c4, {co4, s4});
      end
      // CISFA at bit 2 uses its selectable input when a2 != b2
      if (a4[2] != b4[2] && carry_into(64'(a4), 64'(b4), c4, 2)) hscp_events++;
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {a8, b8, c8} = 17'(v); #1;
      checks++;
      if ({co8, s8} !== 9'(a8) + 9'(b8) + 9'(c8)) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %0d+%0d+%0d -> %0d", a8, b8, c8, {co8, s8});
      end
    end
    for (int v = 0; v < 20000; v++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      if (v == 0) begin a16 = 16'hFFFF; b16 = 16'h0000; c16 = 1'b1; end
      #1;
      checks++;
      if ({co16, s16} !== 17'(a16) + 17'(b16) + 17'(c16)) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 %0d+%0d+%0d -> %0d", a16, b16, c16, {co16, s16});
      end
    end
    checks++;
    if (hscp_events == 0) begin
      failures++; $display("FAIL predicted-carry path never decided a carry");
    end
    $display("predicted-carry path carried a 1 in %0d of 512 4-bit cases", hscp_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
