// Self-checking testbench for dcrhas. Exhaustive in both modes at N = 4 (the
// 4-bit DCHAS), random at N = 10. Mode 0 must give a + b with its carry,
// mode 1 a - b with carry = (a >= b). Both modes are counted.
module tb_dcrhas;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0;

  logic [3:0] a4, b4, sd4;   logic m4, cb4;
  logic [9:0] a10, b10, sd10; logic m10, cb10;

  dcrhas          dut4  (.a(a4),  .b(b4),  .m_sel(m4),  .sd(sd4),  .cb(cb4));
  dcrhas #(.N(10)) dut10 (.a(a10), .b(b10), .m_sel(m10), .sd(sd10), .cb(cb10));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {m4, a4, b4} = 9'(v); #1;
      checks++;
      if (!m4) begin
        n_add++;
        if ({cb4, sd4} !== 5'(a4) + 5'(b4)) begin
          failures++; $display("FAIL add %0d+%0d -> %0d", a4, b4, {cb4, sd4});
        end
      end else begin
        n_sub++;
        if (sd4 !== 4'(a4 - b4) || cb4 !== (a4 >= b4)) begin
          failures++; $display("FAIL sub %0d-%0d -> sd=%0d cb=%0d", a4, b4, sd4, cb4);
        end
      end
    end
    for (int v = 0; v < 20000; v++) begin
      a10 = 10'($urandom); b10 = 10'($urandom); m10 = 1'($urandom); #1;
      checks++;
      if (!m10 ? ({cb10, sd10} !== 11'(a10) + 11'(b10))
               : (sd10 !== 10'(a10 - b10) || cb10 !== (a10 >= b10))) begin
        failures++;
        if (failures < 10) $display("FAIL N=10 m=%0d a=%0d b=%0d -> sd=%0d cb=%0d", m10, a10, b10, sd10, cb10);
      end
    end
    checks++;
    if (n_add == 0 || n_sub == 0) begin
      failures++; $display("FAIL a mode was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
