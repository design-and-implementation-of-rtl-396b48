// Self-checking testbench for dcram. Exhaustive at N = 4 (the 4-bit DCAM),
// N = 6 and N = 8, random at N = 16; every product is compared with the
// integer product a * b.
module tb_dcram;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic [7:0]  p4;
  logic [5:0]  a6, b6;   logic [11:0] p6;
  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [15:0] a16, b16; logic [31:0] p16;

  dcram           dut4  (.a(a4),  .b(b4),  .p(p4));
  dcram #(.N(6))  dut6  (.a(a6),  .b(b6),  .p(p6));
  dcram #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  dcram #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));

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
      if (p4 !== 8'(a4) * 8'(b4)) begin
        failures++; $display("FAIL N=4 %0d*%0d -> %0d", a4, b4, p4);
      end
    end
    for (int v = 0; v < 4096; v++) begin
      {a6, b6} = 12'(v); #1;
      checks++;
      if (p6 !== 12'(a6) * 12'(b6)) begin
        failures++;
        if (failures < 10) $display("FAIL N=6 %0d*%0d -> %0d", a6, b6, p6);
      end
    end
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v); #1;
      checks++;
      if (p8 !== 16'(a8) * 16'(b8)) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %0d*%0d -> %0d", a8, b8, p8);
      end
    end
    for (int v = 0; v < 20000; v++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (v == 0) begin a16 = 16'hFFFF; b16 = 16'hFFFF; end
      #1;
      checks++;
      if (p16 !== 32'(a16) * 32'(b16)) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 %0d*%0d -> %0d", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
