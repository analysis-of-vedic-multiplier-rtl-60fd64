// vedic_2x2: 2x2-bit Vedic multiplier, the leaf of the recursive multiplier.
//
// Vertical and crosswise on two-bit operands: the vertical product a0*b0 is
// bit 0; the crosswise products a1*b0 and a0*b1 are added by a half adder to
// give bit 1 and a carry; the vertical product a1*b1 plus that carry, in a
// second half adder, gives bits 2 and 3. p = a * b. Purely combinational.
//
// The 2x2 multiplier as the base of the recursion follows the multiplication
// scheme; its four AND gates and two half adders are the usual realisation
// and this design's choice.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;

  assign p[0] = a[0] & b[0];

  half_adder u_ha0 (.a(a[1] & b[0]), .b(a[0] & b[1]), .sum(p[1]), .cout(c1));
  half_adder u_ha1 (.a(a[1] & b[1]), .b(c1),          .sum(p[2]), .cout(p[3]));
endmodule
