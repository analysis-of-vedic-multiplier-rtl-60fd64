// vedic_combine: the combining stage of an N x N-bit Vedic multiplier.
//
// Takes the four (N/2) x (N/2)-bit products of the operand halves, each N bits
// wide, and adds them into the 2N-bit product, as in the 16-bit block diagram
// of the method (H = N/2):
//   * adder 1 (N bits, carry in 0):  r1 = ml + lm, carry c1
//   * adder 2 (N bits, carry in 0):  r2 = {mm[H-1:0], ll[N-1:H]} + r1, carry c2
//   * a half adder adds c1 and c2 to a two-bit value {hc, hs}
//   * adder 3 (H bits, carry in 0):  mm[N-1:H] + {0..0, hc, hs}
// The product is
//   p[H-1:0]    = ll[H-1:0]
//   p[N+H-1:H]  = r2
//   p[2N-1:N+H] = adder 3's sum.
// With N = 16 this is the block diagram itself: two 16-bit adders, a half
// adder and an 8-bit adder whose other operand is six zeros, the half adder's
// carry and sum. All three adders are of the topology ADDER
// (vedic_pkg::adder_e). N must be even and at least 4. Purely combinational.
//
// Adder 3 cannot carry out (the product fits in 2N bits), so its carry out is
// left unconnected; lint tools report it as unused.
module vedic_combine
  import vedic_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter adder_e      ADDER = ADD_SQRT_CSA
) (
  input  logic [N-1:0]   mm,  // aM * bM
  input  logic [N-1:0]   ml,  // aM * bL
  input  logic [N-1:0]   lm,  // aL * bM
  input  logic [N-1:0]   ll,  // aL * bL
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] r1, r2;
  logic         c1, c2, hs, hc;
  logic [H-1:0] hi_add;
  logic         c3_unused;

  // adder 1: the two crosswise products
  vedic_adder #(.KIND(ADDER), .W(N)) u_add1 (
    .a(ml), .b(lm), .cin(1'b0), .sum(r1), .cout(c1)
  );

  // adder 2: middle N bits of the vertical products plus the crosswise sum
  vedic_adder #(.KIND(ADDER), .W(N)) u_add2 (
    .a({mm[H-1:0], ll[N-1:H]}), .b(r1), .cin(1'b0), .sum(r2), .cout(c2)
  );

  // the two carries out of the middle, as a two-bit number
  half_adder u_ha (.a(c1), .b(c2), .sum(hs), .cout(hc));

  always_comb begin
    hi_add      = '0;
    hi_add[1:0] = {hc, hs};
  end

  // adder 3: top half of aM*bM plus the carries of the middle
  vedic_adder #(.KIND(ADDER), .W(H)) u_add3 (
    .a(mm[N-1:H]), .b(hi_add), .cin(1'b0), .sum(p[2*N-1:N+H]), .cout(c3_unused)
  );

  assign p[H-1:0]   = ll[H-1:0];
  assign p[N+H-1:H] = r2;
endmodule
