// mac_pkg: widths and types shared by the two-channel Vedic MAC.
//
// The operand width (8 bits) is the size of the multiplier the MAC is built
// around. A product is twice that width, and the sum of the two channel
// products needs one more bit. The accumulator width is this design's own
// choice: 32 bits, so that tens of thousands of full-scale pairs can be
// summed before the accumulator wraps.
package mac_pkg;
  localparam int unsigned OP_W   = 8;          // operand width
  localparam int unsigned PROD_W = 2 * OP_W;   // one product
  localparam int unsigned SUM_W  = PROD_W + 1; // sum of the two channel products
  localparam int unsigned ACC_W_DEFAULT = 32; // default accumulator width
  localparam int unsigned CSLA_BLOCK = 4;      // carry-select block size

  typedef logic [OP_W-1:0]   operand_t;
  typedef logic [PROD_W-1:0] product_t;
  typedef logic [SUM_W-1:0]  pair_sum_t;
endpackage
