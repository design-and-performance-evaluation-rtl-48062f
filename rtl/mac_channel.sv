// mac_channel: one multiplier channel of the two-channel MAC.
//
// An 8x8 Vedic multiplier forms a*b combinationally, and the channel's
// pipeline buffer captures the product on the channel's own clock edge:
// the rising edge when NEG_EDGE is 0, the falling edge when it is 1. The MAC
// runs its two channels on opposite edges so that operands are taken in twice
// per clock period.
//
// Interface: a, b must be stable at the capturing edge; p holds the product
// from that edge until the next one of the same kind (latency: one edge).
// rst_n is an asynchronous active-low reset that clears the buffer.
// The channel structure (multiplier, then buffer, clocked on alternate phases)
// follows the source; the reset is this design's choice.
module mac_channel
  import mac_pkg::*;
#(
  parameter bit NEG_EDGE = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  operand_t a,
  input  operand_t b,
  output product_t p
);
  product_t prod;

  vedic_mul8x8 u_mul (.a(a), .b(b), .p(prod));

  if (NEG_EDGE) begin : g_neg
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n) p <= '0;
      else        p <= prod;
    end
  end else begin : g_pos
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) p <= '0;
      else        p <= prod;
    end
  end
endmodule
