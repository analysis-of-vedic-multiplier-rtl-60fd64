// cbl_adder: W-bit Common Boolean Logic adder ("CBL").
//
// A carry select adder at the granularity of one bit, in which the two
// candidate results share their logic. For carry in 0 a bit's sum is a ^ b and
// its carry out a & b; for carry in 1 the sum is the complement, ~(a ^ b), and
// the carry out a | b. The XOR/XNOR and AND/OR pairs are computed once per bit
// and the real carry from the bit below selects sum and carry out through two
// multiplexers. The carry still ripples through every bit, one multiplexer per
// bit, so the delay grows linearly with W like a ripple carry adder's.
// {cout, sum} = a + b + cin. Purely combinational.
//
// The structure is the usual common Boolean logic carry select adder of the
// literature; the bit-level sharing shown here is this design's reading of it.
module cbl_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0]   c;
  logic [W-1:0] p;      // a ^ b: sum for carry in 0, complement for carry in 1
  logic [W-1:0] g_and;  // carry out for carry in 0
  logic [W-1:0] g_or;   // carry out for carry in 1

  assign p     = a ^ b;
  assign g_and = a & b;
  assign g_or  = a | b;
  assign c[0]  = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign sum[i]  = c[i] ? ~p[i]   : p[i];
    assign c[i+1]  = c[i] ? g_or[i] : g_and[i];
  end

  assign cout = c[W];
endmodule
