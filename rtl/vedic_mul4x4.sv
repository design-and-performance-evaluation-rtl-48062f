// vedic_mul4x4: unsigned 4x4 -> 8-bit multiplier, Urdhva Tiryagbhyam style.
//
// "Vertically and crosswise": result column k is the sum of every bit product
// a[i]&b[j] with i+j == k, plus the carry handed over from column k-1. Column
// k keeps the low bit of that total and passes the rest on as the carry into
// column k+1. Seven columns (0..6) give bits 0..6; the carry out of column 6
// is bit 7. The largest column total is 4 bit products plus a carry of 2, so
// a 3-bit carry is enough.
//
// Purely combinational: a, b in, p out in the same cycle.
// The 4x4 block is the building brick of the 8x8 multiplier; its internal
// column scheme is this design's reading of the vertically-and-crosswise rule.
module vedic_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  always_comb begin
    logic [3:0] column;  // column total: up to 4 bit products + carry 2
    logic [2:0] carry;
    carry = '0;
    p     = '0;
    for (int k = 0; k < 7; k++) begin
      column = {1'b0, carry};
      for (int i = 0; i < 4; i++) begin
        if (k - i >= 0 && k - i < 4) column += {3'b000, a[i] & b[k-i]};
      end
      p[k]  = column[0];
      carry = column[3:1];
    end
    p[7] = carry[0];
  end
endmodule
