// csel_block: one block of a carry select adder built from two ripple carry
// adders.
//
// One W-bit ripple carry adder assumes a carry in of 0, the other a carry in
// of 1; both work while the real carry is still on its way, and when it
// arrives a multiplexer picks the matching sum and carry out. Purely
// combinational. Used by the linear and the square-root carry select adders.
module csel_block #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] sum0, sum1;
  logic         cout0, cout1;

  rca_adder #(.W(W)) u_rca0 (.a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(cout0));
  rca_adder #(.W(W)) u_rca1 (.a(a), .b(b), .cin(1'b1), .sum(sum1), .cout(cout1));

  assign sum  = cin ? sum1  : sum0;
  assign cout = cin ? cout1 : cout0;
endmodule
