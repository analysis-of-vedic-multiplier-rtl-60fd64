// bec_csel_block: one block of the modified (BEC) carry select adder.
//
// A single W-bit ripple carry adder computes {cout0, sum0} = a + b with a
// carry in of 0. A (W+1)-bit Binary to Excess-1 Converter turns that into
// {cout0, sum0} + 1, which is the result for a carry in of 1. The real carry
// in then selects between the two. This needs fewer gates than a second ripple
// carry adder. Purely combinational.
module bec_csel_block #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] sum0;
  logic         cout0;
  logic [W:0]   inc;

  rca_adder #(.W(W)) u_rca0 (.a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(cout0));
  bec #(.W(W+1)) u_bec (.b({cout0, sum0}), .x(inc));

  assign sum  = cin ? inc[W-1:0] : sum0;
  assign cout = cin ? inc[W]     : cout0;
endmodule
