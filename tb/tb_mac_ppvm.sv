// tb_mac_ppvm: end-to-end check of the two-channel MAC at its default sizes.
//
// Operand pairs are streamed in the way the unit takes them: a0/b0 (and
// clear) are valid only around the rising edge and a1/b1 only around the
// following falling edge; in the other half period each input carries
// unrelated random values, so a channel that sampled on the wrong phase
// would corrupt the total. The testbench keeps its own total of
// a0*b0 + a1*b1 per period, restarted by clear and taken modulo 2**32, and
// after every rising edge compares acc and ovf with the value the design must
// show exactly two periods after channel 1 sampled the pair (the latency of
// the sum buffer plus the accumulator). Phase 1 streams random pairs with
// occasional clears; phase 2 streams full-scale operands until the 32-bit
// accumulator wraps. The mechanisms exercised are counted: pairs with both
// channels active, clears, wrap-arounds; one that never happened counts as a
// failure. A watchdog ends the run with a failure after 100000 periods.
module tb_mac_ppvm;
  import mac_pkg::*;
  localparam int unsigned LAT = 2;  // rising edges from channel-1 sampling to acc

  logic        clk = 1'b0, rst_n = 1'b1, clear = 1'b0;
  operand_t    a0, b0, a1, b1;
  logic [31:0] acc;
  logic        ovf;

  // expected acc/ovf after each pair, indexed by pair number
  longint      exp_acc[$];
  logic        exp_ovf[$];
  longint      total;
  logic        tovf;
  int          checks = 0, failures = 0;
  int          n_dual = 0, n_clear = 0, n_wrap = 0;

  mac_ppvm dut (
    .clk(clk), .rst_n(rst_n), .clear(clear),
    .a0(a0), .b0(b0), .a1(a1), .b1(b1), .acc(acc), .ovf(ovf)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one pair: x0*y0 sampled at the coming rising edge, x1*y1 at the falling
  // edge after it; returns after that falling edge
  task automatic pair(int k, logic clr, operand_t x0, operand_t y0, operand_t x1, operand_t y1);
    longint ps, nx;
    // channel-1 operands are already set up by the caller before this edge
    a0 = x0; b0 = y0; clear = clr;
    @(posedge clk) #1;
    // acc now holds the total up to pair k-LAT
    if (k >= int'(LAT)) begin
      checks += 2;
      if (acc !== 32'(exp_acc[k-LAT])) begin
        failures++;
        if (failures < 10) $display("FAIL pair %0d: acc %h want %h", k - LAT, acc, 32'(exp_acc[k-LAT]));
      end
      if (ovf !== exp_ovf[k-LAT]) begin
        failures++;
        if (failures < 10) $display("FAIL pair %0d: ovf %b", k - LAT, ovf);
      end
    end
    a1 = x1; b1 = y1;
    a0 = operand_t'($urandom); b0 = operand_t'($urandom); clear = 1'($urandom);
    @(negedge clk) #1;
    a1 = operand_t'($urandom); b1 = operand_t'($urandom);
    // reference
    ps = longint'(x0) * longint'(y0) + longint'(x1) * longint'(y1);
    if (x0 * y0 != 0 && x1 * y1 != 0) n_dual++;
    if (clr) begin
      n_clear++;
      total = ps;
      tovf  = 1'b0;
    end else begin
      nx = total + ps;
      if (nx >= 64'h1_0000_0000) begin
        tovf = 1'b1;
        n_wrap++;
      end
      total = nx % 64'h1_0000_0000;
    end
    exp_acc.push_back(total);
    exp_ovf.push_back(tovf);
  endtask

  initial begin
    int k;
    a0 = '0; b0 = '0; a1 = '0; b1 = '0;
    total = 0;
    tovf  = 1'b0;
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (acc !== '0 || ovf !== 1'b0) begin failures++; $display("FAIL reset value"); end
    @(negedge clk) #1 rst_n = 1'b1;

    // the very first pair must appear exactly LAT periods later
    k = 0;
    pair(k++, 1'b1, 8'd3, 8'd5, 8'd7, 8'd11);  // 15 + 77 = 92
    // phase 1: random pairs, occasional clear
    for (int n = 0; n < 3000; n++)
      pair(k++, ($urandom % 97) == 0, operand_t'($urandom), operand_t'($urandom),
           operand_t'($urandom), operand_t'($urandom));
    // phase 2: restart, then full scale until the 32-bit total wraps
    // (2**32 / (2*255*255) is about 33026 pairs)
    pair(k++, 1'b1, 8'd255, 8'd255, 8'd255, 8'd255);
    for (int n = 0; n < 33100; n++) pair(k++, 1'b0, 8'd255, 8'd255, 8'd255, 8'd255);
    // drain: zero pairs until every real pair has been checked
    for (int n = 0; n < int'(LAT); n++) pair(k++, 1'b0, '0, '0, '0, '0);

    checks++;
    if (exp_acc[0] != 92) begin failures++; $display("FAIL reference"); end
    $display("pairs=%0d dual_channel=%0d clears=%0d wraps=%0d", k, n_dual, n_clear, n_wrap);
    if (n_dual  == 0) begin failures++; $display("FAIL both channels never active together"); end
    if (n_clear == 0) begin failures++; $display("FAIL clear never used"); end
    if (n_wrap  == 0) begin failures++; $display("FAIL accumulator never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
