// tb_vedic_mul4x4: exhaustive check of the 4x4 Vedic multiplier.
// All 256 operand pairs are applied one per clock period and the product is
// compared with the integer product computed in the testbench. A watchdog
// ends the run with a failure if it has not finished after 1000 periods.
module tb_vedic_mul4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  vedic_mul4x4 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
