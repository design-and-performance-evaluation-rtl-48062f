// tb_mac_accumulator: checks the accumulator stage against a running sum.
// A 32-bit accumulator (the default) and a 12-bit one are fed the same
// random 17-bit values with occasional load pulses. After every rising edge
// acc must equal the reference total modulo 2**ACC_W and ovf must be set
// exactly when a wrap-around occurred since the last load. Runs end with
// full-scale values so that the 32-bit accumulator wraps too. Counts of
// loads and wrap-arounds seen are reported; one that never happened counts
// as a failure. A watchdog ends the run with a failure after 100000 periods.
module tb_mac_accumulator;
  import mac_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b1, load = 1'b0;
  pair_sum_t   din;
  logic [31:0] acc32;
  logic [11:0] acc12;
  logic        ovf32, ovf12;
  longint      ref32, ref12;
  logic        rovf32, rovf12;
  int          checks = 0, failures = 0, n_load = 0, n_wrap32 = 0, n_wrap12 = 0;

  mac_accumulator                        u32 (.clk(clk), .rst_n(rst_n), .load(load), .din(din), .acc(acc32), .ovf(ovf32));
  mac_accumulator #(.ACC_W(12))          u12 (.clk(clk), .rst_n(rst_n), .load(load), .din(din), .acc(acc12), .ovf(ovf12));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic ld, pair_sum_t d);
    longint nx32, nx12;
    load = ld;
    din  = d;
    @(posedge clk) #1;
    if (ld) begin
      n_load++;
      ref32 = longint'(d);          rovf32 = 1'b0;
      ref12 = longint'(d) % 4096;   rovf12 = 1'b0;
    end else begin
      nx32 = ref32 + longint'(d);
      nx12 = ref12 + longint'(d) % 4096;
      if (nx32 >= 64'h1_0000_0000) begin rovf32 = 1'b1; n_wrap32++; end
      if (nx12 >= 4096)            begin rovf12 = 1'b1; n_wrap12++; end
      ref32 = nx32 % 64'h1_0000_0000;
      ref12 = nx12 % 4096;
    end
    checks += 4;
    if (acc32 !== 32'(ref32)) begin failures++; if (failures < 10) $display("FAIL acc32 %h want %h", acc32, 32'(ref32)); end
    if (acc12 !== 12'(ref12)) begin failures++; if (failures < 10) $display("FAIL acc12 %h want %h", acc12, 12'(ref12)); end
    if (ovf32 !== rovf32)     begin failures++; if (failures < 10) $display("FAIL ovf32 %b", ovf32); end
    if (ovf12 !== rovf12)     begin failures++; if (failures < 10) $display("FAIL ovf12 %b", ovf12); end
  endtask

  initial begin
    din = '0;
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (acc32 !== '0 || ovf32 !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1'b1;
    ref32 = 0; ref12 = 0; rovf32 = 1'b0; rovf12 = 1'b0;
    for (int n = 0; n < 3000; n++) step(($urandom % 50) == 0, pair_sum_t'($urandom));
    step(1'b1, '1);
    for (int n = 0; n < 33000; n++) step(1'b0, '1);  // 2**32 / (2**17-1) is about 32770
    $display("loads=%0d wraps32=%0d wraps12=%0d", n_load, n_wrap32, n_wrap12);
    if (n_load == 0)   begin failures++; $display("FAIL no load seen"); end
    if (n_wrap32 == 0) begin failures++; $display("FAIL 32-bit accumulator never wrapped"); end
    if (n_wrap12 == 0) begin failures++; $display("FAIL 12-bit accumulator never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
