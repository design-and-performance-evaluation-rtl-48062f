// mac_ppvm: two-channel parallel-pipelined multiply-accumulate unit.
//
// Two 8x8 Vedic multiplier channels work on opposite clock phases. Channel 1
// captures a0*b0 in its buffer on the rising edge, channel 2 captures a1*b1
// on the following falling edge. On the next rising edge the first
// carry-select adder's sum of the two buffered products is stored in the sum
// buffer, and one cycle later the second carry-select adder, closed in a loop
// with the accumulator register, adds it to the running total:
//
//   edge      t      : p1  <= a0*b0            (channel 1, rising edge)
//   edge      t+1/2  : p2  <= a1*b1            (channel 2, falling edge)
//   edge      t+1    : sum <= p1 + p2          (first CSLA, sum buffer)
//   edge      t+2    : acc <= acc + sum        (second CSLA, accumulator)
//
// So one pair of products enters per clock period, the two operands of a
// channel pair arriving half a period apart, and a pair is in acc two
// periods after channel 1 sampled it.
//
// Interface: a0/b0 and clear are sampled on the rising edge, a1/b1 on the
// falling edge half a period later. clear travels down the pipeline with its
// operands and makes the accumulator restart from that pair's sum. acc and
// ovf (sticky wrap-around flag since the last clear) are registered.
// rst_n is an asynchronous active-low reset for every register.
// The two opposite-phase channels, the buffers and the two carry-select
// adders follow the source. The clear input, the overflow flag, the reset
// and the 32-bit accumulator are this design's choices.
// The concurrent assertion at the end uses rst_n in its disable clause, so
// lint notes rst_n as both an asynchronous and a synchronous signal; the
// flip-flops themselves use it only as an asynchronous reset.
module mac_ppvm
  import mac_pkg::*;
#(
  parameter int unsigned ACC_W = ACC_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  operand_t         a0,
  input  operand_t         b0,
  input  operand_t         a1,
  input  operand_t         b1,
  output logic [ACC_W-1:0] acc,
  output logic             ovf
);
  product_t  p1, p2;
  pair_sum_t pair_sum, sum_q;
  logic      clear_q1, clear_q2;
  logic      pair_cout;

  mac_channel #(.NEG_EDGE(1'b0)) u_ch1 (.clk(clk), .rst_n(rst_n), .a(a0), .b(b0), .p(p1));
  mac_channel #(.NEG_EDGE(1'b1)) u_ch2 (.clk(clk), .rst_n(rst_n), .a(a1), .b(b1), .p(p2));

  // first CSLA: sum of the two channel products
  csla_adder #(.WIDTH(SUM_W)) u_csla1 (
    .a({1'b0, p1}), .b({1'b0, p2}), .cin(1'b0), .sum(pair_sum), .cout(pair_cout)
  );

  // sum buffer, and the clear flag travelling alongside the data
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q    <= '0;
      clear_q1 <= 1'b0;
      clear_q2 <= 1'b0;
    end else begin
      sum_q    <= pair_sum;
      clear_q1 <= clear;
      clear_q2 <= clear_q1;
    end
  end

  // second CSLA with the accumulator register
  mac_accumulator #(.DIN_W(SUM_W), .ACC_W(ACC_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .load(clear_q2), .din(sum_q), .acc(acc), .ovf(ovf)
  );

  // two 16-bit products always fit the 17-bit pair sum
  assert property (@(posedge clk) disable iff (!rst_n) !pair_cout)
    else $error("pair sum overflowed its %0d bits", SUM_W);
endmodule
