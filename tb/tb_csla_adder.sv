// tb_csla_adder: checks the carry-select adder at three widths.
// A 17-bit adder (the pair-sum width, last block one bit wide), a 32-bit
// adder (the accumulator width) and an 8-bit adder with 3-bit blocks are
// driven with random operands and carries plus corner cases (all ones,
// carry rippling across every block). {cout, sum} is compared with the
// integer sum. A watchdog ends the run with a failure after 10000 periods.
module tb_csla_adder;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  logic [16:0] a17, b17, s17;
  logic [31:0] a32, b32, s32;
  logic [7:0]  a8,  b8,  s8;
  logic        ci17, ci32, ci8, co17, co32, co8;

  csla_adder #(.WIDTH(17))            u17 (.a(a17), .b(b17), .cin(ci17), .sum(s17), .cout(co17));
  csla_adder #(.WIDTH(32))            u32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));
  csla_adder #(.WIDTH(8), .BLOCK(3))  u8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    logic [17:0] e17;
    logic [32:0] e32;
    logic [8:0]  e8;
    #1;
    e17 = {1'b0, a17} + {1'b0, b17} + 18'(ci17);
    e32 = {1'b0, a32} + {1'b0, b32} + 33'(ci32);
    e8  = {1'b0, a8}  + {1'b0, b8}  + 9'(ci8);
    checks += 3;
    if ({co17, s17} !== e17) begin failures++; $display("FAIL17 %h+%h+%b=%h", a17, b17, ci17, {co17, s17}); end
    if ({co32, s32} !== e32) begin failures++; $display("FAIL32 %h+%h+%b=%h", a32, b32, ci32, {co32, s32}); end
    if ({co8,  s8}  !== e8)  begin failures++; $display("FAIL8 %h+%h+%b=%h",  a8,  b8,  ci8,  {co8,  s8});  end
  endtask

  initial begin
    // corner cases: carry through every block, all ones, zero
    @(negedge clk);
    a17 = '1; b17 = '0; ci17 = 1'b1;
    a32 = '1; b32 = '0; ci32 = 1'b1;
    a8  = '1; b8  = '0; ci8  = 1'b1;
    check_all();
    @(negedge clk);
    a17 = '1; b17 = '1; ci17 = 1'b1;
    a32 = '1; b32 = '1; ci32 = 1'b1;
    a8  = '1; b8  = '1; ci8  = 1'b1;
    check_all();
    @(negedge clk);
    a17 = '0; b17 = '0; ci17 = 1'b0;
    a32 = '0; b32 = '0; ci32 = 1'b0;
    a8  = '0; b8  = '0; ci8  = 1'b0;
    check_all();
    @(negedge clk);
    a17 = 17'h0FFFF; b17 = 17'h00001; ci17 = 1'b0;
    a32 = 32'h0000FFFF; b32 = 32'hFFFF0001; ci32 = 1'b0;
    a8  = 8'h3F; b8 = 8'h01; ci8 = 1'b0;
    check_all();
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      a17 = 17'($urandom); b17 = 17'($urandom); ci17 = 1'($urandom);
      a32 = $urandom;      b32 = $urandom;      ci32 = 1'($urandom);
      a8  = 8'($urandom);  b8  = 8'($urandom);  ci8  = 1'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
