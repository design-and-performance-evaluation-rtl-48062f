// vedic_mul8x8: unsigned 8x8 -> 16-bit multiplier from four 4x4 Vedic blocks.
//
// The operands are split into nibbles and multiplied crosswise:
//   q0 = A[3:0]*B[3:0]   q1 = A[7:4]*B[3:0]
//   q2 = A[3:0]*B[7:4]   q3 = A[7:4]*B[7:4]
// Three adders, chained from right to left, combine them:
//   s1 = q2 + q0[7:4]           (first adder, 9 bits)
//   s2 = s1 + q1                (second adder, 9 bits)
//   s3 = q3 + s2[8:4]           (third adder)
// and the product is {s3[7:0], s2[3:0], q0[3:0]}: q0[3:0] is Prod[3:0], the
// second adder gives Prod[7:4] and the third gives Prod[15:8].
//
// Purely combinational. The split into four 4x4 multipliers and three 8-bit
// adders, and the order in which the adders are chained, follow the published
// structure; the adders themselves are plain binary adders (this design's
// choice, the source does not say which adder they are).
module vedic_mul8x8
  import mac_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);
  logic [7:0] q0, q1, q2, q3;
  logic [8:0] s1, s2;
  logic [7:0] s3;

  vedic_mul4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_mul4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic_mul4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic_mul4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q3));

  always_comb begin
    s1 = {1'b0, q2} + {5'b0, q0[7:4]};
    s2 = s1 + {1'b0, q1};
    s3 = q3 + {3'b0, s2[8:4]};  // cannot overflow: the full product fits 16 bits
    p  = {s3, s2[3:0], q0[3:0]};
  end
endmodule
