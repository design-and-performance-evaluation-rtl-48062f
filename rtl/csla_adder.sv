// csla_adder: WIDTH-bit carry-select adder.
//
// The operands are cut into blocks of BLOCK bits (the last block may be
// narrower). The lowest block is a plain ripple adder on the incoming carry.
// Every higher block is computed twice in parallel, once assuming a carry-in
// of 0 and once of 1, and the real carry out of the block below selects one
// of the two results. The critical path is therefore one block adder plus a
// chain of 2:1 multiplexers instead of a full WIDTH-bit ripple.
//
// Purely combinational: {cout, sum} = a + b + cin.
// The adder kind is named by the source; the block size of 4 and the
// ripple-carry block adders are this design's choice.
module csla_adder #(
  parameter int unsigned WIDTH = 17,
  parameter int unsigned BLOCK = mac_pkg::CSLA_BLOCK
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NBLK = (WIDTH + BLOCK - 1) / BLOCK;

  logic [NBLK:0] carry;  // carry[i] is the carry into block i
  assign carry[0] = cin;

  for (genvar g = 0; g < NBLK; g++) begin : g_blk
    localparam int unsigned LO = g * BLOCK;
    localparam int unsigned HI = ((LO + BLOCK) < WIDTH ? (LO + BLOCK) : WIDTH) - 1;
    localparam int unsigned W  = HI - LO + 1;

    if (g == 0) begin : g_ripple
      assign {carry[1], sum[HI:LO]} = {1'b0, a[HI:LO]} + {1'b0, b[HI:LO]} + {{W{1'b0}}, carry[0]};
    end else begin : g_select
      logic [W:0] r0, r1;  // {carry out, sum} for carry-in 0 and 1
      assign r0 = {1'b0, a[HI:LO]} + {1'b0, b[HI:LO]};
      assign r1 = {1'b0, a[HI:LO]} + {1'b0, b[HI:LO]} + {{W{1'b0}}, 1'b1};
      assign {carry[g+1], sum[HI:LO]} = carry[g] ? r1 : r0;
    end
  end

  assign cout = carry[NBLK];
endmodule
