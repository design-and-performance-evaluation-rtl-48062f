// tb_vedic_mul8x8: exhaustive check of the 8x8 Vedic multiplier.
// All 65536 operand pairs are applied, one per clock period, and each
// product is compared with the integer product worked out in the testbench.
// A watchdog ends the run with a failure after 70000 periods.
module tb_vedic_mul8x8;
  import mac_pkg::*;
  operand_t a, b;
  product_t p;
  logic     clk = 1'b0;
  int       checks = 0, failures = 0;

  vedic_mul8x8 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        @(negedge clk);
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
