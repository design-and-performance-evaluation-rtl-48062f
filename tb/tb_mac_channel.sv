// tb_mac_channel: checks a rising-edge and a falling-edge channel.
// Each channel gets random operands that are valid only around its own
// capturing edge and are replaced by unrelated values around the other edge.
// After its edge the channel's buffered product must equal a*b of the values
// present at that edge, and it must not change at the opposite edge. A
// watchdog ends the run with a failure after 10000 periods.
module tb_mac_channel;
  import mac_pkg::*;
  logic     clk = 1'b0, rst_n = 1'b1;
  operand_t a_p, b_p, a_n, b_n;
  product_t p_p, p_n;
  product_t exp_p, exp_n;
  int       checks = 0, failures = 0;

  mac_channel #(.NEG_EDGE(1'b0)) u_pos (.clk(clk), .rst_n(rst_n), .a(a_p), .b(b_p), .p(p_p));
  mac_channel #(.NEG_EDGE(1'b1)) u_neg (.clk(clk), .rst_n(rst_n), .a(a_n), .b(b_n), .p(p_n));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, product_t got, product_t want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    a_p = '0; b_p = '0; a_n = '0; b_n = '0;
    #1 rst_n = 1'b0;
    #1;
    expect_eq("reset pos", p_p, '0);
    expect_eq("reset neg", p_n, '0);
    @(negedge clk) #1 rst_n = 1'b1;
    exp_p = '0;
    exp_n = '0;
    for (int n = 0; n < 3000; n++) begin
      // before the rising edge: valid operands for the rising-edge channel,
      // junk for the falling-edge one
      a_p = operand_t'($urandom); b_p = operand_t'($urandom);
      a_n = operand_t'($urandom); b_n = operand_t'($urandom);
      @(posedge clk) #1;
      exp_p = product_t'(a_p * b_p);
      expect_eq("pos after rising edge", p_p, exp_p);
      expect_eq("neg holds at rising edge", p_n, exp_n);
      a_p = operand_t'($urandom); b_p = operand_t'($urandom);
      a_n = operand_t'($urandom); b_n = operand_t'($urandom);
      @(negedge clk) #1;
      exp_n = product_t'(a_n * b_n);
      expect_eq("neg after falling edge", p_n, exp_n);
      expect_eq("pos holds at falling edge", p_p, exp_p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
