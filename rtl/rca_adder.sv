// rca_adder: W-bit ripple carry adder.
//
// W full adders chained from bit 0 upward: the carry out of bit i is the
// carry in of bit i+1. {cout, sum} = a + b + cin. Purely combinational; the
// delay grows linearly with W, which is what the faster topologies improve on.
// It is both one of the five adder choices of the multiplier and the building
// block of the carry select adders.
module rca_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
