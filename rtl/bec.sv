// bec: W-bit Binary to Excess-1 Converter, x = b + 1.
//
// Bit 0 is inverted; every higher bit i is b[i] XOR (b[i-1] AND ... AND b[0]),
// i.e. it toggles when all bits below it are one. The input is W bits and the
// output W bits; callers that need the carry of the increment give one more
// bit (the block's carry out) as the top input bit. Purely combinational.
//
// The BEC carry select adder uses it in place of the second (carry in = 1)
// ripple carry adder of each block.
module bec #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);
  // all_ones[i] is the AND of b[i-1:0] (1 for i = 0)
  logic [W-1:0] all_ones;

  assign all_ones[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_chain
    assign all_ones[i] = all_ones[i-1] & b[i-1];
  end

  assign x = b ^ all_ones;
endmodule
