// mac_accumulator: the accumulating stage of the MAC.
//
// The accumulator register acc is fed back into a carry-select adder together
// with the incoming value din; on every rising clock edge acc takes the sum.
// When load is high the register takes din alone, which starts a new
// accumulation without a bubble cycle. The adder's carry out marks a
// wrap-around past 2**ACC_W; ovf is a sticky flag that records one since the
// last load.
//
// Interface: din and load are sampled on the rising edge of clk; acc and ovf
// are registered outputs (latency one cycle). rst_n is an asynchronous
// active-low reset.
// The feedback through a carry-select adder follows the source. The load
// input, the sticky overflow flag, the reset and the default width of 32 bits
// are this design's choices.
module mac_accumulator
  import mac_pkg::*;
#(
  parameter int unsigned DIN_W = SUM_W,
  parameter int unsigned ACC_W = ACC_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [DIN_W-1:0] din,
  output logic [ACC_W-1:0] acc,
  output logic             ovf
);
  logic [ACC_W-1:0] addend, sum;
  logic             carry;

  // zero-extend (or, if DIN_W > ACC_W, truncate) the incoming value
  always_comb begin
    addend = '0;
    for (int i = 0; i < ACC_W && i < DIN_W; i++) addend[i] = din[i];
  end

  csla_adder #(.WIDTH(ACC_W)) u_add (
    .a(acc), .b(addend), .cin(1'b0), .sum(sum), .cout(carry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ovf <= 1'b0;
    end else if (load) begin
      acc <= addend;
      ovf <= 1'b0;
    end else begin
      acc <= sum;
      ovf <= ovf | carry;
    end
  end
endmodule
